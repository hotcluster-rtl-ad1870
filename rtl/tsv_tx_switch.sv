// tsv_tx_switch: lower-die cluster switch of one router.
//
// Drives the router's five physical clusters (four border clusters and the
// internal redundant one) and the lateral wires towards its neighbours from
// the cluster maps built by cluster_map:
//   - an own cluster that carries lane l is driven with that lane;
//   - an own cluster lent to neighbour d is driven with the data that
//     neighbour sends over (lend_in[d]), except in a beat of our own in
//     which one of our lanes is mapped to it in virtual mode;
//   - a lane carried by a cluster borrowed from neighbour d is sent to that
//     neighbour on borrow_out[d].
// Unused clusters and wires are driven with 0. The paper redirects signals
// with tri-state gates; this design uses multiplexers. Purely combinational.
module tsv_tx_switch
  import hc_pkg::*;
(
  input  chunk_t    [NCL-1:0]    lane_tx,
  input  logic                   beat_valid,
  input  lane_map_t [NCL-1:0]    lane_map,
  input  phys_map_t [NPHY-1:0]   phys_map,
  input  logic [3:0][2:0]        lent_phys,
  input  chunk_t    [3:0]        lend_in,     // from neighbour d, for our lent cluster
  output chunk_t    [NPHY-1:0]   phys_tx,
  output chunk_t    [3:0]        borrow_out   // to neighbour d, for its cluster we use
);

  always_comb begin
    for (int p = 0; p < NPHY; p++) begin
      phys_tx[p] = '0;
      if (phys_map[p].used)
        phys_tx[p] = phys_map[p].lent ? lend_in[phys_map[p].idx] : lane_tx[phys_map[p].idx];
    end
    borrow_out = '0;
    for (int l = 0; l < NCL; l++) begin
      if (lane_map[l].src == SRC_BORROW)
        borrow_out[lane_map[l].idx[1:0]] = lane_tx[l];
      if (lane_map[l].src == SRC_VIRTUAL && beat_valid)
        phys_tx[lent_phys[lane_map[l].idx[1:0]]] = lane_tx[l];
    end
  end

endmodule
