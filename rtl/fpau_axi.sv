// fpau_axi: the arithmetic unit packaged as a memory-mapped peripheral.
//
// The floating point arithmetic unit (fpau) is wrapped as a custom IP with an
// AXI4-Lite slave port, so that a processor can reach it over an AXI
// interconnect: software writes the two operands and the operation, then
// reads back the result. Operands may be written either as IEEE 754 words or
// as signed Q16.16 binary numbers, which two fx_to_ieee converters turn into
// IEEE 754 before they reach the unit.
//
// Register map (byte addresses, 32-bit registers; this map is this
// implementation's choice):
//   0x0  OPA     read/write  operand A
//   0x4  OPB     read/write  operand B
//   0x8  CTRL    read/write  [1:0] operation (00 add, 01 sub, 10 mul, 11 div)
//                            [2]   OPA holds a Q16.16 number, convert it
//                            [3]   OPB holds a Q16.16 number, convert it
//                read only   [12:8] flags of the last result
//                            {invalid, divide by zero, overflow, underflow, inexact}
//   0xC  RESULT  read only   A op B as an IEEE 754 word
// Writes honour WSTRB; writes to RESULT or to read-only bits are ignored.
// Every response is OKAY.
//
// Timing: a write is accepted in the cycle where AWVALID and WVALID are both
// high and no write response is waiting (AWREADY = WREADY = that condition);
// BVALID follows on the next edge. The unit registers its result one edge
// after its inputs change, so a register write sets `pending` for one cycle,
// during which ARREADY is held low: a read issued after a write always sees
// the new result. A read is accepted when ARVALID is high, no read data is
// waiting and nothing is pending; RDATA/RVALID follow on the next edge.
// s_axi_aresetn (active low, synchronous) clears the registers and channels.
module fpau_axi
  import fp_pkg::*;
#(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              s_axi_aclk,
  input  logic              s_axi_aresetn,
  // write address
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic [2:0]        s_axi_awprot,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  // write data
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  // write response
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  // read address
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic [2:0]        s_axi_arprot,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  // read data
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready
);

  localparam logic [1:0] REG_OPA = 2'd0, REG_OPB = 2'd1, REG_CTRL = 2'd2, REG_RESULT = 2'd3;

  logic [31:0] opa, opb;
  logic [3:0]  ctrl;
  logic        pending;
  logic        wr_hs, rd_hs;
  logic [1:0]  wr_idx, rd_idx;
  logic [31:0] a_cvt, b_cvt, a_ieee, b_ieee, result;
  fp_flags_t   flags;
  logic        a_inx_unused, b_inx_unused;
  logic [2:0]  prot_unused;

  assign prot_unused = s_axi_awprot | s_axi_arprot;   // protection type is not used

  // --- operand conversion and the arithmetic unit ---------------------------
  fx_to_ieee #(.W(32), .FRAC_BITS(16)) u_cvt_a (.x(opa), .result(a_cvt), .inexact(a_inx_unused));
  fx_to_ieee #(.W(32), .FRAC_BITS(16)) u_cvt_b (.x(opb), .result(b_cvt), .inexact(b_inx_unused));

  assign a_ieee = ctrl[2] ? a_cvt : opa;
  assign b_ieee = ctrl[3] ? b_cvt : opb;

  fpau u_fpau (
    .clk(s_axi_aclk), .a(a_ieee), .b(b_ieee), .sel(fpau_op_e'(ctrl[1:0])),
    .result(result), .flags(flags)
  );

  // --- write channel ---------------------------------------------------------
  assign wr_hs         = s_axi_awvalid & s_axi_wvalid & ~s_axi_bvalid;
  assign s_axi_awready = wr_hs;
  assign s_axi_wready  = wr_hs;
  assign s_axi_bresp   = 2'b00;
  assign wr_idx        = s_axi_awaddr[3:2];

  function automatic logic [31:0] apply_strb(logic [31:0] old, logic [31:0] data, logic [3:0] strb);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = strb[i] ? data[8*i +: 8] : old[8*i +: 8];
    return r;
  endfunction

  always_ff @(posedge s_axi_aclk) begin
    if (!s_axi_aresetn) begin
      opa          <= '0;
      opb          <= '0;
      ctrl         <= '0;
      pending      <= 1'b0;
      s_axi_bvalid <= 1'b0;
    end else begin
      pending <= 1'b0;
      if (wr_hs) begin
        s_axi_bvalid <= 1'b1;
        unique case (wr_idx)
          REG_OPA:  begin opa <= apply_strb(opa, s_axi_wdata, s_axi_wstrb); pending <= 1'b1; end
          REG_OPB:  begin opb <= apply_strb(opb, s_axi_wdata, s_axi_wstrb); pending <= 1'b1; end
          REG_CTRL: begin
            if (s_axi_wstrb[0]) ctrl <= s_axi_wdata[3:0];
            pending <= 1'b1;
          end
          default: ;
        endcase
      end else if (s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
    end
  end

  // --- read channel ----------------------------------------------------------
  assign s_axi_arready = ~s_axi_rvalid & ~pending;
  assign rd_hs         = s_axi_arvalid & s_axi_arready;
  assign s_axi_rresp   = 2'b00;
  assign rd_idx        = s_axi_araddr[3:2];

  always_ff @(posedge s_axi_aclk) begin
    if (!s_axi_aresetn) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else if (rd_hs) begin
      s_axi_rvalid <= 1'b1;
      unique case (rd_idx)
        REG_OPA:    s_axi_rdata <= opa;
        REG_OPB:    s_axi_rdata <= opb;
        REG_CTRL:   s_axi_rdata <= {19'd0, flags, 4'd0, ctrl};
        REG_RESULT: s_axi_rdata <= result;
      endcase
    end else if (s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end

endmodule
