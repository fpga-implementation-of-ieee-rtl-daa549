// div_unit: single-precision division.
//
// pre_norm_div (leading-zero count, mantissa shift, exponent, one cycle),
// serial_div (restoring divider, one quotient bit per cycle, 27 cycles) and
// post_norm_div (normalize, round, special operands, one cycle), as in the unit's
// block diagram. The operands and rmode_i are sampled when start_i is high and held
// inside the unit. ready_o falls on start and rises 29 clock cycles later together
// with result_o and status_o; it stays high until the next start.
module div_unit (
  input  logic                  clk_i,
  input  logic                  start_i,
  input  logic [31:0]           opa_i,
  input  logic [31:0]           opb_i,
  input  fpu_pkg::rmode_e       rmode_i,
  output logic [31:0]           result_o,
  output fpu_pkg::unit_status_t status_o,
  output logic                  ready_o
);
  import fpu_pkg::*;

  logic [31:0]        s_opa, s_opb;
  rmode_e             s_rmode;
  logic               pre_done, core_ready, core_ready_q, core_done;
  logic [23:0]        dvdnd, dvsor;
  logic signed [12:0] exp_p;
  logic [26:0]        quot;
  logic               rem_nz;

  // first cycle of the divider's ready, ignoring a stale level right after start
  assign core_done = core_ready && !core_ready_q && !pre_done;

  always_ff @(posedge clk_i) begin
    if (start_i) begin
      s_opa   <= opa_i;
      s_opb   <= opb_i;
      s_rmode <= rmode_i;
    end
    pre_done     <= start_i;
    core_ready_q <= core_ready;
    if (start_i)        ready_o <= 1'b0;
    else if (core_done) ready_o <= 1'b1;
  end

  pre_norm_div u_pre (
    .clk_i, .en_i(start_i), .opa_i, .opb_i,
    .dvdnd_o(dvdnd), .dvsor_o(dvsor), .exp_o(exp_p)
  );

  serial_div u_core (
    .clk_i, .start_i(pre_done), .dvdnd_i(dvdnd), .dvsor_i(dvsor),
    .quot_o(quot), .rem_nz_o(rem_nz), .ready_o(core_ready)
  );

  post_norm_div u_post (
    .clk_i, .en_i(core_done),
    .opa_i(s_opa), .opb_i(s_opb), .rmode_i(s_rmode),
    .quot_i(quot), .rem_nz_i(rem_nz), .exp_i(exp_p),
    .result_o, .status_o
  );

endmodule
