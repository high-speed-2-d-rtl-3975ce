// tb_siso_register: self-checking test of the serial-in serial-out register.
//
// After a reset (all taps zero) random samples are shifted in; after every
// clock edge each tap k must equal the sample applied k+1 edges earlier,
// taken from a history kept by the testbench. Reset is applied again in the
// middle of the stream and must clear every tap.
module tb_siso_register;

  localparam int W = 4, DEPTH = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                    rst;
  logic [W-1:0]            din;
  logic [DEPTH-1:0][W-1:0] taps;

  siso_register #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst, .din, .taps);

  logic [W-1:0] hist [$];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst = 1'b1; din = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    hist.delete();
    for (int k = 0; k < DEPTH; k++) hist.push_front('0);
    for (int k = 0; k < DEPTH; k++) check(taps[k] == '0, $sformatf("tap %0d not cleared", k));
  endtask

  initial begin
    do_reset();
    for (int n = 0; n < 300; n++) begin
      if (n == 150) do_reset();
      din = W'($urandom);
      hist.push_front(din);
      @(posedge clk); #1;
      for (int k = 0; k < DEPTH; k++)
        check(taps[k] == hist[k], $sformatf("n=%0d tap %0d got %h want %h", n, k, taps[k], hist[k]));
      void'(hist.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
