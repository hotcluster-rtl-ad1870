// tsv_rx_switch: upper-die cluster switch of one router, the mirror of
// tsv_tx_switch under the same cluster maps.
//
// Each lane is taken from the own cluster that carries it, from the borrowed
// neighbour's cluster (forwarded by that neighbour on borrow_in[d]) or, in
// virtual mode, from the own cluster lent out towards d. The contents of every
// own cluster lent to neighbour d are forwarded to it on lend_out[d]. Purely
// combinational; which lane data is meaningful in a cycle is decided by the
// deserializer's beat_valid.
module tsv_rx_switch
  import hc_pkg::*;
(
  input  chunk_t    [NPHY-1:0]   phys_rx,
  input  chunk_t    [3:0]        borrow_in,   // from neighbour d's cluster we use
  input  lane_map_t [NCL-1:0]    lane_map,
  input  logic [3:0][2:0]        lent_phys,
  input  logic [3:0]             lend_to,
  output chunk_t    [NCL-1:0]    lane_rx,
  output chunk_t    [3:0]        lend_out     // to neighbour d, from our lent cluster
);

  always_comb begin
    for (int l = 0; l < NCL; l++) begin
      unique case (lane_map[l].src)
        SRC_OWN:     lane_rx[l] = phys_rx[lane_map[l].idx];
        SRC_BORROW:  lane_rx[l] = borrow_in[lane_map[l].idx[1:0]];
        SRC_VIRTUAL: lane_rx[l] = phys_rx[lent_phys[lane_map[l].idx[1:0]]];
        default:     lane_rx[l] = '0;
      endcase
    end
    for (int d = 0; d < 4; d++)
      lend_out[d] = lend_to[d] ? phys_rx[lent_phys[d]] : '0;
  end

endmodule
