// sample_fifo - first-in first-out buffer for the sample pairs of the last
// decimator, which are too slow for a hardware FFT stage and are instead
// read by the processor and transformed in software.
//
// A circular buffer of DEPTH words (DEPTH a power of two) with separate
// write and read pointers one bit wider than the address. dout shows the
// oldest entry while the FIFO is not empty (first-word fall-through); rd
// removes it. A write to a full FIFO is dropped and sets the sticky
// overflow flag, which only rst clears, so the software can tell that its
// record has a gap. level gives the number of stored words. Depth and
// overflow policy are this design's choice.
module sample_fifo #(
  parameter int W     = 56,
  parameter int DEPTH = 1024
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr,
  input  logic [W-1:0]               din,
  input  logic                       rd,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH):0]     level,
  output logic                       overflow
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;
  logic         do_wr, do_rd;

  assign level = wp - rp;
  assign empty = (wp == rp);
  assign full  = (level == (AW+1)'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign dout  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      rp       <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      if (wr && full) overflow <= 1'b1;
    end
  end
endmodule
