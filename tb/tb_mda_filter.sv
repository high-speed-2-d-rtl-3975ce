// tb_mda_filter: self-checking test of the distributed-arithmetic inner product.
//
// Three instances: the 9-tap low-pass set (77, 34, -10, -2, 3) and the 7-tap
// high-pass set (71, -38, -4, 6) on unsigned 5-bit pre-added samples with a
// 12-bit result, and the low-pass set on signed 13-bit samples with an 18-bit
// result. The reference is the integer inner product reduced modulo 2^OUT_W.
// A directed vector u = (4, 4, 4, 4, 2) must give 402 (binary 0000110010010),
// and the extreme inputs exercise the wrap-around of the output.
module tb_mda_filter;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int LC [5] = '{77, 34, -10, -2, 3};
  localparam int HC [4] = '{71, -38, -4, 6};

  logic [4:0][4:0]  ul;  logic [11:0] yl;
  logic [3:0][4:0]  uh;  logic [11:0] yh;
  logic [4:0][12:0] us;  logic [17:0] ys;

  mda_filter #(.NU(5), .U_W(5),  .U_SIGNED(1'b0), .COEF(LC), .OUT_W(12)) dut_l (.u(ul), .y(yl));
  mda_filter #(.NU(4), .U_W(5),  .U_SIGNED(1'b0), .COEF(HC), .OUT_W(12)) dut_h (.u(uh), .y(yh));
  mda_filter #(.NU(5), .U_W(13), .U_SIGNED(1'b1), .COEF(LC), .OUT_W(18)) dut_s (.u(us), .y(ys));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dot_l(input logic [4:0][4:0] u);
    int s = 0;
    for (int j = 0; j < 5; j++) s += LC[j] * int'(u[j]);
    return s;
  endfunction
  function automatic int dot_h(input logic [3:0][4:0] u);
    int s = 0;
    for (int j = 0; j < 4; j++) s += HC[j] * int'(u[j]);
    return s;
  endfunction
  function automatic int dot_s(input logic [4:0][12:0] u);
    int s = 0;
    for (int j = 0; j < 5; j++) s += LC[j] * int'($signed(u[j]));
    return s;
  endfunction

  initial begin
    int r;
    // directed: the example vector
    ul = {5'd2, 5'd4, 5'd4, 5'd4, 5'd4};
    uh = '0; us = '0;
    #1;
    check(yl == 12'd402, $sformatf("example vector got %0d want 402", yl));
    for (int n = 0; n < 3000; n++) begin
      for (int j = 0; j < 5; j++) ul[j] = 5'($urandom);
      for (int j = 0; j < 4; j++) uh[j] = 5'($urandom);
      for (int j = 0; j < 5; j++) us[j] = 13'($urandom);
      if (n == 0) begin ul = '1; uh = '1; us = {5{13'h1000}}; end
      if (n == 1) begin us = {5{13'h0fff}}; end
      #1;
      r = dot_l(ul);
      check(yl == 12'(r), $sformatf("lpf got %0d want %0d", yl, r));
      r = dot_h(uh);
      check(yh == 12'(r), $sformatf("hpf got %0d want %0d", yh, r));
      r = dot_s(us);
      check(ys == 18'(r), $sformatf("signed lpf got %0d want %0d", $signed(ys), r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
