// bh_window - applies the 4-term minimum-sidelobe Blackman-Harris window
// (92 dB sidelobes, equivalent noise bandwidth about 2 bins) to both real
// channels before the FFT.
//
// A sample counter modulo N = 2^LOG2N, restarted by rst, addresses a window
// ROM of N unsigned Q0.WIN_W-1 values that is computed at elaboration from
// w(n) = 0.35875 - 0.48829 cos(2 pi n/N) + 0.14128 cos(4 pi n/N)
//        - 0.01168 cos(6 pi n/N)
// (periodic form). Each output is floor(x * w(n) / 2^(WIN_W-1)), W bits.
// Every N consecutive in_valid form one frame. out_valid and the products
// follow in_valid by one clock. The window type is the specified one; the
// coefficient values, periodic form and rounding are this design's.
module bh_window
  import xspec_pkg::*;
#(
  parameter int W     = 16,
  parameter int LOG2N = 10,
  parameter int WIN_W = 18
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_a,
  input  logic signed [W-1:0] in_b,
  output logic                out_valid,
  output logic signed [W-1:0] out_a,
  output logic signed [W-1:0] out_b
);
  localparam int N = 1 << LOG2N;
  typedef logic [WIN_W-1:0] win_t;
  typedef win_t win_tab_t [N];

  function automatic win_tab_t make_window();
    win_tab_t t;
    for (int n = 0; n < N; n++)
      t[n] = WIN_W'(bh_window_q(n, N, WIN_W - 1));
    return t;
  endfunction

  localparam win_tab_t WIN = make_window();

  logic [LOG2N-1:0] n_idx;
  logic signed [W+WIN_W:0] pa, pb;

  assign pa = (W+WIN_W+1)'(in_a) * (W+WIN_W+1)'(signed'({1'b0, WIN[n_idx]}));
  assign pb = (W+WIN_W+1)'(in_b) * (W+WIN_W+1)'(signed'({1'b0, WIN[n_idx]}));

  always_ff @(posedge clk) begin
    if (rst) begin
      n_idx     <= '0;
      out_valid <= 1'b0;
      out_a     <= '0;
      out_b     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        n_idx <= n_idx + 1'b1;
        out_a <= W'(pa >>> (WIN_W - 1));
        out_b <= W'(pb >>> (WIN_W - 1));
      end
    end
  end
endmodule
