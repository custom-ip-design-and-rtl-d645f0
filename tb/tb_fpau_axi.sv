// tb_fpau_axi: end-to-end test of the arithmetic unit as a memory-mapped peripheral.
//
// An AXI4-Lite master, playing the processor, writes operands and the
// control word and reads back RESULT and CTRL (flags), as the board software
// would. It runs the document's example (9.75 and 0.525 through add, sub,
// mul and div), the same operands written as Q16.16 binary numbers with
// conversion enabled, and 400 random operations in random formats, with
// random response back-pressure. Expected values come from fp_ref_pkg.
//
// It counts how often each mechanism of the design happened and fails if
// one never did: each of the four operations, conversion of A and of B,
// a read stalled by the pending cycle after a write, a byte-strobed partial
// write, write-response and read-data back-pressure, an exception flag read
// back, and a register read-back. Assertions check the AXI rules that a
// VALID stays high, with stable data, until its READY.
// The top is instantiated with its default parameters.
module tb_fpau_axi;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        aresetn;
  logic [3:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_op[4];
  int n_cvt_a = 0, n_cvt_b = 0, n_stall = 0, n_strb = 0, n_bbp = 0, n_rbp = 0, n_flag = 0, n_readback = 0;

  fpau_axi dut (
    .s_axi_aclk(clk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awprot(3'b000), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(3'b000), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AXI slave rules
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!aresetn)
    rvalid && !rready |=> rvalid && $stable(rdata))
    else begin failures++; $display("FAIL RVALID/RDATA not held"); end
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!aresetn)
    bvalid && !bready |=> bvalid)
    else begin failures++; $display("FAIL BVALID not held"); end
  a_okay: assert property (@(posedge clk) disable iff (!aresetn)
    (!rvalid || rresp == 2'b00) && (!bvalid || bresp == 2'b00))
    else begin failures++; $display("FAIL response not OKAY"); end

  always @(posedge clk) begin
    if (bvalid && !bready) n_bbp++;
    if (rvalid && !rready) n_rbp++;
  end

  event wr_accepted;

  task automatic axi_write(logic [3:0] addr, logic [31:0] data, logic [3:0] strb, int b_delay);
    @(negedge clk);
    awaddr = addr; awvalid = 1'b1; wdata = data; wstrb = strb; wvalid = 1'b1;
    #1;
    while (!(awready && wready)) begin @(negedge clk); #1; end
    @(posedge clk);
    -> wr_accepted;
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    repeat (b_delay) @(negedge clk);
    bready = 1'b1;
    #1;
    while (!bvalid) begin @(negedge clk); #1; end
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic axi_read(logic [3:0] addr, int r_delay, output logic [31:0] data);
    @(negedge clk);
    araddr = addr; arvalid = 1'b1;
    #1;
    while (!arready) begin n_stall++; @(negedge clk); #1; end
    @(negedge clk);
    arvalid = 1'b0;
    repeat (r_delay) @(negedge clk);
    rready = 1'b1;
    #1;
    while (!rvalid) begin @(negedge clk); #1; end
    data = rdata;
    @(negedge clk);
    rready = 1'b0;
  endtask

  // Write B and read RESULT right away: the read is issued in the cycle
  // after the write is accepted, while the pending cycle is in effect.
  task automatic write_b_and_read(logic [31:0] opb, output logic [31:0] res);
    fork
      axi_write(4'h4, opb, 4'hF, $urandom_range(0, 2));
      begin
        @(wr_accepted);
        axi_read(4'hC, $urandom_range(0, 2), res);
      end
    join
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] expect_v);
    checks++;
    if (got !== expect_v) begin
      failures++;
      if (failures < 15) $display("FAIL %s: got %h expected %h", what, got, expect_v);
    end
  endtask

  // one complete operation: operands, control, result
  task automatic operation(logic [31:0] opa, logic [31:0] opb, int op, logic ca, logic cb,
                           logic [31:0] expect_v);
    logic [31:0] res;
    axi_write(4'h0, opa, 4'hF, $urandom_range(0, 2));
    axi_write(4'h8, {28'd0, cb, ca, 2'(op)}, 4'h1, $urandom_range(0, 2));
    write_b_and_read(opb, res);
    check($sformatf("op%0d %h %h cvt=%b%b", op, opa, opb, ca, cb), res, expect_v);
    n_op[op]++;
    if (ca) n_cvt_a++;
    if (cb) n_cvt_b++;
  endtask

  function automatic logic [31:0] q16_to_ieee(logic [31:0] v);
    return r2f(real'($signed(v)) / 65536.0);
  endfunction

  initial begin
    logic [31:0] r;
    foreach (n_op[i]) n_op[i] = 0;
    aresetn = 1'b0;
    awaddr = '0; araddr = '0; awvalid = 0; wvalid = 0; arvalid = 0; bready = 0; rready = 0;
    wdata = '0; wstrb = '0;
    repeat (3) @(posedge clk);
    aresetn = 1'b1;

    // after reset everything reads as zero
    axi_read(4'h0, 0, r); check("OPA after reset", r, 32'h0);
    axi_read(4'h8, 0, r); check("CTRL after reset", r, 32'h0);

    // the document's example, IEEE operands
    operation(32'h411C0000, 32'h3F066666, 0, 0, 0, 32'h41246666);
    operation(32'h411C0000, 32'h3F066666, 1, 0, 0, 32'h4113999A);
    operation(32'h411C0000, 32'h3F066666, 2, 0, 0, 32'h40A3CCCC);
    operation(32'h411C0000, 32'h3F066666, 3, 0, 0, 32'h4194924A);

    // same numbers as Q16.16 binary: 9.75 = 0x0009C000, 0.525 ~ 0x00008666
    operation(32'h0009C000, 32'h3F066666, 0, 1, 0, 32'h41246666);
    operation(32'h0009C000, 32'h00008666, 0, 1, 1,
              ref_op(32'h411C0000, q16_to_ieee(32'h00008666), 0));

    // byte-strobed write: change only the top byte of OPA (9.75 -> -9.75)
    axi_write(4'h0, 32'h411C0000, 4'hF, 0);
    axi_write(4'h8, 32'h0000_0000, 4'h1, 0);
    axi_write(4'h0, 32'hC1FFFFFF, 4'b1000, 0);
    n_strb++;
    axi_read(4'h0, 1, r); check("strobed OPA", r, 32'hC11C0000);
    n_readback++;
    write_b_and_read(32'h3F066666, r);
    check("strobed add", r, 32'hC113999A);   // -9.75 + 0.525 = -9.225

    // exception flag read back: 1/0 sets divide-by-zero
    operation(32'h3F800000, 32'h00000000, 3, 0, 0, 32'h7F800000);
    axi_read(4'h8, 3, r);
    check("div_zero flag", {r[12:8], r[3:0]}, {5'b01000, 4'b0011});
    if (r[11]) n_flag++;

    // random operations in random formats
    for (int i = 0; i < 400; i++) begin
      logic [31:0] x, y, xi, yi;
      logic ca, cb;
      int op;
      ca = ($urandom_range(0, 3) == 0);
      cb = ($urandom_range(0, 3) == 0);
      x  = ca ? $urandom : rand_fp();
      y  = cb ? $urandom : rand_fp();
      xi = ca ? q16_to_ieee(x) : x;
      yi = cb ? q16_to_ieee(y) : y;
      op = $urandom_range(0, 3);
      operation(x, y, op, ca, cb, ref_op(xi, yi, op));
    end

    // every mechanism must have happened
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL operation %0d never ran", i); end
    end
    checks++; if (n_cvt_a == 0)    begin failures++; $display("FAIL no conversion of A"); end
    checks++; if (n_cvt_b == 0)    begin failures++; $display("FAIL no conversion of B"); end
    checks++; if (n_stall == 0)    begin failures++; $display("FAIL no pending stall"); end
    checks++; if (n_strb == 0)     begin failures++; $display("FAIL no strobed write"); end
    checks++; if (n_bbp == 0)      begin failures++; $display("FAIL no B back-pressure"); end
    checks++; if (n_rbp == 0)      begin failures++; $display("FAIL no R back-pressure"); end
    checks++; if (n_flag == 0)     begin failures++; $display("FAIL no flag read back"); end
    checks++; if (n_readback == 0) begin failures++; $display("FAIL no register read-back"); end
    $display("ops add=%0d sub=%0d mul=%0d div=%0d cvtA=%0d cvtB=%0d stalls=%0d strobe=%0d bbp=%0d rbp=%0d flag=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_cvt_a, n_cvt_b, n_stall, n_strb, n_bbp, n_rbp, n_flag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
