// tb_sym_preadd: self-checking test of the symmetric pre-adder.
//
// Two instances: the 9-tap unsigned 4-bit configuration of the first filter
// stage and a 7-tap signed 12-bit configuration as in the second stage.
// Random windows are applied; every output is compared with the integer sum
// of the mirrored pair (and the extended centre sample for the last output).
module tb_sym_preadd;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [8:0][3:0]  win_a;  logic [4:0][4:0]  u_a;
  logic [6:0][11:0] win_b;  logic [3:0][12:0] u_b;

  sym_preadd #(.NTAPS(9), .IN_W(4),  .SIGNED(1'b0)) dut_a (.win(win_a), .u(u_a));
  sym_preadd #(.NTAPS(7), .IN_W(12), .SIGNED(1'b1)) dut_b (.win(win_b), .u(u_b));

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
    int ref_v;
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 9; i++) win_a[i] = 4'($urandom);
      for (int i = 0; i < 7; i++) win_b[i] = 12'($urandom);
      if (n == 0) begin win_a = '1; win_b = {7{12'h800}}; end
      #1;
      for (int k = 0; k < 4; k++) begin
        ref_v = int'(win_a[k]) + int'(win_a[8-k]);
        check(int'(u_a[k]) == ref_v, $sformatf("9-tap u%0d got %0d want %0d", k+1, u_a[k], ref_v));
      end
      check(int'(u_a[4]) == int'(win_a[4]), "9-tap centre");
      for (int k = 0; k < 3; k++) begin
        ref_v = int'($signed(win_b[k])) + int'($signed(win_b[6-k]));
        check(int'($signed(u_b[k])) == ref_v,
              $sformatf("7-tap r%0d got %0d want %0d", k+1, $signed(u_b[k]), ref_v));
      end
      check(int'($signed(u_b[3])) == int'($signed(win_b[3])), "7-tap centre");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
