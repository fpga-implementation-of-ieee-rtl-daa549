// sqrt: arithmetic core of the square-root unit, an iterative shift-and-subtract
// square root over 26 loops.
//
// Computes root = floor(sqrt(radicand)) for a 52-bit radicand, one result bit per
// clock cycle, using only shifts, a comparison and a subtraction: each loop brings
// down the next two radicand bits into the partial remainder, compares it with the
// trial value 4*root + 1 (root shifted left by two, a one appended), subtracts and
// sets the new root bit when it fits. After 26 loops the root is complete
// (26 loops as in the detailed square-root flowchart) and rem_nz_o reports a
// non-zero remainder, the sticky bit for rounding. The digit-by-digit remainder
// form is this design's reading of the flowchart's successive-approximation loop.
// Timing: start_i loads the radicand; 26 cycles later ready_o rises with root_o and
// rem_nz_o and stays high until the next start.
module sqrt #(
  parameter int unsigned RD_WIDTH = 52,            // radicand width
  parameter int unsigned SQ_WIDTH = RD_WIDTH / 2   // root width = number of loops
) (
  input  logic                clk_i,
  input  logic                start_i,
  input  logic [RD_WIDTH-1:0] rad_i,
  output logic [SQ_WIDTH-1:0] root_o,
  output logic                rem_nz_o,
  output logic                ready_o
);
  localparam int unsigned RW = SQ_WIDTH + 4;       // partial remainder width
  localparam int unsigned CW = $clog2(SQ_WIDTH + 1);

  logic [RD_WIDTH-1:0] rad;
  logic [RW-1:0]       rem, rem_t, trial, rem_n;
  logic [CW-1:0]       count;
  logic                busy, fits;

  always_comb begin
    rem_t = {rem[RW-3:0], rad[RD_WIDTH-1 -: 2]};
    trial = {2'b00, root_o, 2'b01};
    fits  = rem_t >= trial;
    rem_n = fits ? (rem_t - trial) : rem_t;
  end

  always_ff @(posedge clk_i) begin
    if (start_i) begin
      rad     <= rad_i;
      rem     <= '0;
      root_o  <= '0;
      count   <= CW'(SQ_WIDTH);
      busy    <= 1'b1;
      ready_o <= 1'b0;
    end else if (busy) begin
      rad    <= rad << 2;
      rem    <= rem_n;
      root_o <= {root_o[SQ_WIDTH-2:0], fits};
      count  <= count - 1'b1;
      if (count == CW'(1)) begin
        busy     <= 1'b0;
        ready_o  <= 1'b1;
        rem_nz_o <= rem_n != '0;
      end
    end
  end

endmodule
