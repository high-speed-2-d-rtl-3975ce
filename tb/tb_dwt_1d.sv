// tb_dwt_1d: self-checking test of one 9/7 DWT filter stage.
//
// Two instances: the first-stage configuration (unsigned 4-bit input, 12-bit
// outputs) and the second-stage configuration (signed 12-bit input, 18-bit
// outputs). A reference model keeps the last nine inputs (zero after reset)
// and evaluates both filters in integer arithmetic; outputs are compared in
// the cycle each input is applied, modulo 2^OUT_W. A constant input of 3
// (binary 0011) must settle to yl = 603 and yh = 192 (binary 000011000000)
// exactly when the eighth copy has entered the delay line, and not before.
module tb_dwt_1d;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst;
  logic [3:0]  xa;  logic [11:0] yla, yha;
  logic [11:0] xb;  logic [17:0] ylb, yhb;

  dwt_1d dut_a (.clk, .rst, .x(xa), .yl(yla), .yh(yha));
  dwt_1d #(.IN_W(12), .IN_SIGNED(1'b1), .OUT_W(18)) dut_b (.clk, .rst, .x(xb), .yl(ylb), .yh(yhb));

  int ha [9];
  int hb [9];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lpf(input int w [9]);
    return 77*(w[0]+w[8]) + 34*(w[1]+w[7]) - 10*(w[2]+w[6]) - 2*(w[3]+w[5]) + 3*w[4];
  endfunction
  function automatic int hpf(input int w [9]);
    return 71*(w[1]+w[7]) - 38*(w[2]+w[6]) - 4*(w[3]+w[5]) + 6*w[4];
  endfunction

  // apply one sample, check both instances before the edge, then clock it in
  task automatic step(input logic [3:0] va, input logic [11:0] vb);
    xa = va; xb = vb;
    for (int i = 8; i > 0; i--) begin ha[i] = ha[i-1]; hb[i] = hb[i-1]; end
    ha[0] = int'(va); hb[0] = int'($signed(vb));
    #1;
    check(yla == 12'(lpf(ha)), $sformatf("a yl got %0d want %0d", yla, 12'(lpf(ha))));
    check(yha == 12'(hpf(ha)), $sformatf("a yh got %0d want %0d", yha, 12'(hpf(ha))));
    check(ylb == 18'(lpf(hb)), $sformatf("b yl got %0d want %0d", ylb, 18'(lpf(hb))));
    check(yhb == 18'(hpf(hb)), $sformatf("b yh got %0d want %0d", yhb, 18'(hpf(hb))));
    @(posedge clk); #1;
  endtask

  task automatic do_reset();
    rst = 1'b1; xa = '0; xb = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 9; i++) begin ha[i] = 0; hb[i] = 0; end
  endtask

  initial begin
    do_reset();
    for (int n = 0; n < 1000; n++) step(4'($urandom), 12'($urandom));
    // step response to a constant 3: settles after eight samples are stored
    do_reset();
    for (int n = 0; n < 12; n++) begin
      step(4'd3, 12'd3);
      // after this step's edge, n+1 copies are in the delay line
    end
    xa = 4'd3; #1;
    check(yla == 12'd603, $sformatf("constant 3: yl got %0d want 603", yla));
    check(yha == 12'b000011000000, $sformatf("constant 3: yh got %0d want 192", yha));
    // latency: with seven stored copies the output is not yet settled
    do_reset();
    for (int n = 0; n < 7; n++) step(4'd3, 12'd3);
    xa = 4'd3; #1;
    check(yla != 12'd603, "constant 3: yl settled before the window was full");
    @(posedge clk); #1;
    check(yla == 12'd603, "constant 3: yl not settled after eight stored samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
