// sqrt_unit: single-precision square root.
//
// pre_norm_sqrt (leading-zero count, 28 appended zeros, exponent halving, one
// cycle), sqrt (iterative shift-and-subtract root, 26 loops plus its load cycle)
// and post_norm_sqrt (round, special operands, one cycle), as in the unit's block
// diagram. Only operand A is used. opa_i and rmode_i are sampled when start_i is
// high and held inside the unit. ready_o falls on start and rises 29 clock cycles
// later together with result_o and status_o; it stays high until the next start.
module sqrt_unit (
  input  logic                  clk_i,
  input  logic                  start_i,
  input  logic [31:0]           opa_i,
  input  fpu_pkg::rmode_e       rmode_i,
  output logic [31:0]           result_o,
  output fpu_pkg::unit_status_t status_o,
  output logic                  ready_o
);
  import fpu_pkg::*;

  logic [31:0]        s_opa;
  rmode_e             s_rmode;
  logic               pre_done, core_ready, core_ready_q, core_done;
  logic [51:0]        radicand;
  logic signed [12:0] exp_p;
  logic [25:0]        root;
  logic               rem_nz;

  // first cycle of the root's ready, ignoring a stale level right after start
  assign core_done = core_ready && !core_ready_q && !pre_done;

  always_ff @(posedge clk_i) begin
    if (start_i) begin
      s_opa   <= opa_i;
      s_rmode <= rmode_i;
    end
    pre_done     <= start_i;
    core_ready_q <= core_ready;
    if (start_i)        ready_o <= 1'b0;
    else if (core_done) ready_o <= 1'b1;
  end

  pre_norm_sqrt u_pre (
    .clk_i, .en_i(start_i), .opa_i,
    .radicand_o(radicand), .exp_o(exp_p)
  );

  sqrt #(.RD_WIDTH(52), .SQ_WIDTH(26)) u_core (
    .clk_i, .start_i(pre_done), .rad_i(radicand),
    .root_o(root), .rem_nz_o(rem_nz), .ready_o(core_ready)
  );

  post_norm_sqrt u_post (
    .clk_i, .en_i(core_done),
    .opa_i(s_opa), .rmode_i(s_rmode),
    .root_i(root), .rem_nz_i(rem_nz), .exp_i(exp_p),
    .result_o, .status_o
  );

endmodule
