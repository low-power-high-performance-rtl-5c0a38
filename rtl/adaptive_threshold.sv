// adaptive_threshold: dynamic training threshold in the style of O-GEHL.
//
// A signed counter tc (TC_BITS wide) moves up on every mispredicted branch and down
// on every correctly predicted branch whose output magnitude did not exceed the
// threshold. When tc would pass its maximum the threshold theta goes up by one and tc
// restarts at 0; when it would pass its minimum theta goes down by one and tc
// restarts at 0. This keeps training after mispredictions and training after weak
// correct predictions roughly equally frequent. theta saturates at 0 and at its
// maximum. The rule follows O-GEHL; TC_BITS and THETA_INIT are choices of this
// design.
//
// Interface: upd (one resolved branch this cycle), mispred, low_margin; theta is a
// register, updated at the clock edge. inc / dec pulse for one cycle when theta moves.
module adaptive_threshold
  import anp_pkg::*;
#(
  parameter int unsigned TC_BITS    = 7,
  parameter int unsigned THETA_INIT = 70
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  upd,
  input  logic                  mispred,
  input  logic                  low_margin,
  output logic [THETA_BITS-1:0] theta,
  output logic                  inc,
  output logic                  dec
);

  localparam logic signed [TC_BITS-1:0] TC_MAX = {1'b0, {(TC_BITS-1){1'b1}}};
  localparam logic signed [TC_BITS-1:0] TC_MIN = {1'b1, {(TC_BITS-1){1'b0}}};

  logic signed [TC_BITS-1:0] tc;

  always_comb begin
    inc = upd && mispred && (tc == TC_MAX) && (theta != '1);
    dec = upd && !mispred && low_margin && (tc == TC_MIN) && (theta != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tc    <= '0;
      theta <= THETA_BITS'(THETA_INIT);
    end else if (upd) begin
      if (mispred) begin
        if (tc == TC_MAX) begin
          tc <= '0;
          if (inc) theta <= theta + 1'b1;
        end else begin
          tc <= tc + 1'b1;
        end
      end else if (low_margin) begin
        if (tc == TC_MIN) begin
          tc <= '0;
          if (dec) theta <= theta - 1'b1;
        end else begin
          tc <= tc - 1'b1;
        end
      end
    end
  end

endmodule
