// serial_div: arithmetic core of the division unit, a serial restoring divider.
//
// Division by repeated subtraction, one quotient bit per clock cycle. With both
// mantissas normalized (leading one at bit 23) the quotient lies between 1/2 and 2.
// The divider produces 27 quotient bits, Q = floor(dvdnd * 2^26 / dvsor): bit 26 is
// the integer bit, bits 25..0 the fraction, which leaves the 24 result bits plus a
// guard bit after normalization. Each step compares the partial remainder with the
// divisor, subtracts when it fits, records the bit and doubles the remainder.
// rem_nz_o reports a non-zero final remainder; it becomes the sticky bit.
// Timing: start_i loads the operands; 27 cycles later ready_o rises with quot_o and
// rem_nz_o and stays high until the next start.
module serial_div (
  input  logic        clk_i,
  input  logic        start_i,
  input  logic [23:0] dvdnd_i,
  input  logic [23:0] dvsor_i,
  output logic [26:0] quot_o,
  output logic        rem_nz_o,
  output logic        ready_o
);
  localparam int unsigned STEPS = 27;

  logic [25:0] rem, rem_sub;
  logic [23:0] dvsor;
  logic [4:0]  count;
  logic        busy;
  logic        fits;

  always_comb begin
    fits    = rem >= {2'b00, dvsor};
    rem_sub = fits ? (rem - {2'b00, dvsor}) : rem;
  end

  always_ff @(posedge clk_i) begin
    if (start_i) begin
      rem     <= {2'b00, dvdnd_i};
      dvsor   <= dvsor_i;
      count   <= 5'(STEPS);
      busy    <= 1'b1;
      ready_o <= 1'b0;
    end else if (busy) begin
      rem    <= rem_sub << 1;
      quot_o <= {quot_o[25:0], fits};
      count  <= count - 5'd1;
      if (count == 5'd1) begin
        busy     <= 1'b0;
        ready_o  <= 1'b1;
        rem_nz_o <= rem_sub != '0;
      end
    end
  end

endmodule
