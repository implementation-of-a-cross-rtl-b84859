// test_signal_gen - two-channel digital test signal for checking the
// analyzer without the analog front end.
//
// Three 32-bit Galois LFSRs (polynomial x^32 + x^22 + x^2 + x + 1, maximal
// length) run from different seeds and advance 32 steps per clock (a
// leap-forward XOR network), so every output word is made of fresh bits and
// the noise is white down to the lowest stage's band; with one step per
// clock consecutive words would be shifted copies of each other, a
// high-pass signal with almost no power at low frequencies. Their top W-2 bits
// give three uniform noise sequences c, na and nb; the outputs are
// a = c + na and b = c + nb. The common part c is identical in both
// channels and survives cross-spectrum averaging, while na and nb are
// independent and average away, the same situation the cross-correlation
// method exploits with two measurement channels. A new pair appears every
// clock; the LFSRs reload their seeds on rst. The generator exists as a box
// of the architecture; its signal is this design's choice.
module test_signal_gen #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  output logic signed [W-1:0] a,
  output logic signed [W-1:0] b
);
  localparam logic [31:0] POLY = 32'h8020_0003;   // taps 32, 22, 2, 1
  localparam logic [31:0] SEED_C = 32'h1234_5678;
  localparam logic [31:0] SEED_A = 32'h9E37_79B9;
  localparam logic [31:0] SEED_B = 32'h7F4A_7C15;

  logic [31:0] lfsr_c, lfsr_a, lfsr_b;

  function automatic logic [31:0] step(logic [31:0] s);
    return s[0] ? ((s >> 1) ^ POLY) : (s >> 1);
  endfunction

  function automatic logic [31:0] leap(logic [31:0] s);
    logic [31:0] t;
    t = s;
    for (int i = 0; i < 32; i++) t = step(t);
    return t;
  endfunction

  logic signed [W-3:0] c, na, nb;
  assign c  = lfsr_c[31 -: W-2];
  assign na = lfsr_a[31 -: W-2];
  assign nb = lfsr_b[31 -: W-2];

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr_c <= SEED_C;
      lfsr_a <= SEED_A;
      lfsr_b <= SEED_B;
      a      <= '0;
      b      <= '0;
    end else begin
      lfsr_c <= leap(lfsr_c);
      lfsr_a <= leap(lfsr_a);
      lfsr_b <= leap(lfsr_b);
      a      <= W'(c) + W'(na);
      b      <= W'(c) + W'(nb);
    end
  end
endmodule
