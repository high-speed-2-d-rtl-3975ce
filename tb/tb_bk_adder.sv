// tb_bk_adder: self-checking test of the Brent-Kung adder.
//
// The 4-bit adder of the default size is checked exhaustively (all 256
// operand pairs), and 13-bit and 24-bit instances, the widths the filter
// datapath uses, with random operands plus the all-ones carry-chain case.
// The reference is the plain integer sum, {cout, s} == a + b.
module tb_bk_adder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;   logic c4;
  logic [12:0] a13, b13, s13; logic c13;
  logic [23:0] a24, b24, s24; logic c24;

  bk_adder                dut4  (.a(a4),  .b(b4),  .s(s4),  .cout(c4));
  bk_adder #(.W(13))      dut13 (.a(a13), .b(b13), .s(s13), .cout(c13));
  bk_adder #(.W(24))      dut24 (.a(a24), .b(b24), .s(s24), .cout(c24));

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

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        check({c4, s4} == 5'(i + j), $sformatf("W=4 %0d+%0d got %0d", i, j, {c4, s4}));
      end
    end
    a13 = '1; b13 = 13'd1; a24 = '1; b24 = 24'd1;
    #1;
    check({c13, s13} == 14'h2000, "W=13 carry chain");
    check({c24, s24} == 25'h1000000, "W=24 carry chain");
    for (int n = 0; n < 2000; n++) begin
      a13 = 13'($urandom); b13 = 13'($urandom);
      a24 = 24'($urandom); b24 = 24'($urandom);
      #1;
      check({c13, s13} == 14'(a13) + 14'(b13), $sformatf("W=13 %h+%h", a13, b13));
      check({c24, s24} == 25'(a24) + 25'(b24), $sformatf("W=24 %h+%h", a24, b24));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
