// siso_register: serial-in serial-out shift register (the sample delay line).
//
// Each rising clock edge shifts din into stage 0 and every stage k into stage
// k+1, so at any time taps[k] holds the sample that was on din k+1 cycles ago,
// X(n-1-k) when din carries X(n). Together with din itself the taps form the
// window X(n) .. X(n-DEPTH) that a symmetric FIR filter needs. The default of
// eight W = 4-bit stages matches the X(n-1) .. X(n-8) chain of the filter
// structure; the synchronous, active-high reset that clears every stage is
// this design's choice (the published design does not describe a reset).
module siso_register #(
  parameter int W     = 4,
  parameter int DEPTH = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [W-1:0]          din,
  output logic [DEPTH-1:0][W-1:0] taps
);

  always_ff @(posedge clk) begin
    if (rst) taps <= '0;
    else     taps <= {taps[DEPTH-2:0], din};
  end

endmodule
