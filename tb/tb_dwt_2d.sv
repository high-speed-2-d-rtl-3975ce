// tb_dwt_2d: end-to-end self-checking test of the two-stage DWT at its
// default sizes (4-bit input, 12-bit first-stage and 18-bit second-stage
// outputs).
//
// A reference model in integer arithmetic runs the same cascade: the
// first-stage filters on the last nine input samples, reduced to 12-bit two's
// complement, then the second-stage filters on the last nine values of each
// first-stage stream, reduced modulo 2^18. All six outputs are compared in
// every cycle. The stimulus is, in order: the constant input 3 (binary 0011),
// which must settle to yl = 603, yh = 192 after eight stored samples and to
// yll = 121203, ylh = yhl = 38592, yhh = 12288 after sixteen; a random stream
// that includes a reset in the middle; and a stream of full-scale steps that
// drives the first-stage outputs past the 12-bit range. The testbench counts
// how often each mechanism of the datapath was exercised (a negative
// sign-row result, a first-stage wrap-around, a second-stage wrap-around, a
// mid-stream reset) and counts a failure for any that never happened.
module tb_dwt_2d;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst;
  logic [3:0]  x;
  logic [11:0] yl, yh;
  logic [17:0] yll, ylh, yhl, yhh;

  dwt_2d dut (.clk, .rst, .x, .yl, .yh, .yll, .ylh, .yhl, .yhh);

  int hx [9];          // X(n) .. X(n-8)
  int hl [9], hh [9];  // first-stage streams, as signed 12-bit values

  int n_negative = 0, n_wrap1 = 0, n_wrap2 = 0, n_reset = 0;

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

  function automatic int lpf(input int w [9]);
    return 77*(w[0]+w[8]) + 34*(w[1]+w[7]) - 10*(w[2]+w[6]) - 2*(w[3]+w[5]) + 3*w[4];
  endfunction
  function automatic int hpf(input int w [9]);
    return 71*(w[1]+w[7]) - 38*(w[2]+w[6]) - 4*(w[3]+w[5]) + 6*w[4];
  endfunction
  function automatic int as_s12(input int v);
    return int'($signed(12'(v)));
  endfunction
  function automatic logic fits(input int v, input int w);
    return v >= -(1 << (w-1)) && v < (1 << (w-1));
  endfunction

  // apply one sample, check every output before the edge, then clock it in
  task automatic step(input logic [3:0] v);
    int l1, h1, ll, lh, hl2, hh2;
    x = v;
    for (int i = 8; i > 0; i--) begin hx[i] = hx[i-1]; hl[i] = hl[i-1]; hh[i] = hh[i-1]; end
    hx[0] = int'(v);
    l1 = lpf(hx); h1 = hpf(hx);
    hl[0] = as_s12(l1); hh[0] = as_s12(h1);
    ll = lpf(hl); lh = hpf(hl); hl2 = lpf(hh); hh2 = hpf(hh);
    if (l1 < 0 || h1 < 0 || ll < 0 || lh < 0 || hl2 < 0 || hh2 < 0) n_negative++;
    if (!fits(l1, 12) || !fits(h1, 12)) n_wrap1++;
    if (!fits(ll, 18) || !fits(lh, 18) || !fits(hl2, 18) || !fits(hh2, 18)) n_wrap2++;
    #1;
    check(yl  == 12'(l1),  $sformatf("yl got %0d want %0d", yl, 12'(l1)));
    check(yh  == 12'(h1),  $sformatf("yh got %0d want %0d", yh, 12'(h1)));
    check(yll == 18'(ll),  $sformatf("yll got %0d want %0d", yll, 18'(ll)));
    check(ylh == 18'(lh),  $sformatf("ylh got %0d want %0d", ylh, 18'(lh)));
    check(yhl == 18'(hl2), $sformatf("yhl got %0d want %0d", yhl, 18'(hl2)));
    check(yhh == 18'(hh2), $sformatf("yhh got %0d want %0d", yhh, 18'(hh2)));
    @(posedge clk); #1;
  endtask

  task automatic do_reset();
    rst = 1'b1; x = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 9; i++) begin hx[i] = 0; hl[i] = 0; hh[i] = 0; end
  endtask

  initial begin
    do_reset();
    // constant 3: first stage settles after 8 stored samples, second after 16
    for (int n = 0; n < 8; n++) step(4'd3);
    x = 4'd3; #1;
    check(yl == 12'd603 && yh == 12'd192, "first stage not settled after 8 samples");
    check(yll != 18'd121203, "second stage settled before 16 samples");
    for (int n = 8; n < 16; n++) step(4'd3);
    x = 4'd3; #1;
    check(yll == 18'd121203 && ylh == 18'd38592 && yhl == 18'd38592 && yhh == 18'd12288,
          $sformatf("constant 3: got %0d %0d %0d %0d", yll, ylh, yhl, yhh));

    // random stream with a reset in the middle
    for (int n = 0; n < 1500; n++) begin
      if (n == 700) begin do_reset(); n_reset++; end
      step(4'($urandom));
    end

    // full-scale steps: long runs of 15 and 0
    for (int n = 0; n < 400; n++) step((n / 10) % 2 == 0 ? 4'd15 : 4'd0);

    if (n_negative == 0) begin failures++; $display("FAIL no negative result"); end
    if (n_wrap1 == 0)    begin failures++; $display("FAIL no first-stage wrap-around"); end
    if (n_wrap2 == 0)    begin failures++; $display("FAIL no second-stage wrap-around"); end
    if (n_reset == 0)    begin failures++; $display("FAIL no mid-stream reset"); end
    $display("mechanisms: negative=%0d wrap12=%0d wrap18=%0d reset=%0d",
             n_negative, n_wrap1, n_wrap2, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
