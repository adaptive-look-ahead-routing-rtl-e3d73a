// Preferred-output-port unit: turns a router's local congestion into the
// preference word it sends to its four neighbours.
//
// Each router pre-computes which of its outputs it prefers for adaptively
// routed packets and hands that to its neighbours, which use it when they
// compute, one hop ahead, the port the packet will take here. The congestion
// of an output is measured as the number of free flit slots (credits) in the
// input buffer of the downstream router behind it; more free slots means less
// congestion. For north-east bound packets North is preferred when it has
// strictly more free slots than East, likewise South against East for
// south-east bound packets; on a tie East is kept. West needs no comparison
// because west-first routes westward hops deterministically.
//
// Interface: cong_free[d] is indexed by la_noc_pkg::dir_e. pref is
// registered: a change of congestion shows in pref one clock later, which is
// the cycle it takes to reach the neighbours. Reset clears pref (East
// preferred in both cases, i.e. dimension-order behaviour).
// The credit-count metric, the tie rule and the one-cycle register are this
// design's choices; the document gives the function, not the comparison.
module pref_port_unit
  import la_noc_pkg::*;
#(
  parameter int unsigned CONG_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CONG_W-1:0] cong_free [NUM_DIRS],
  output pref_t             pref
);

  pref_t pref_d;

  always_comb begin
    pref_d.ne_take_y = cong_free[DIR_NORTH] > cong_free[DIR_EAST];
    pref_d.se_take_y = cong_free[DIR_SOUTH] > cong_free[DIR_EAST];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pref <= '0;
    else        pref <= pref_d;
  end

endmodule
