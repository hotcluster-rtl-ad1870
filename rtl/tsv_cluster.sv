// tsv_cluster: behavioural model of one TSV cluster (not synthesizable
// hardware in its own right: the real part is a group of through-silicon vias
// built as a process macro).
//
// The cluster carries W signals from the lower die to the upper die. A
// cluster-level defect (the clustering defect the design is built to survive)
// is modelled as every via of the cluster open, so the upper die reads 0 on
// all W bits. The defect input exists only for simulation; a real cluster has
// just the W vias. Propagation is modelled with a 1-unit delay. Only one
// signalling direction (up) is modelled; the paper's cluster can also be
// driven in the other direction through tri-state gates.
module tsv_cluster #(
  parameter int unsigned W = 11
) (
  input  logic [W-1:0] tx,      // driven on the lower die
  input  logic         defect,  // model only: the whole cluster is open
  output logic [W-1:0] rx       // seen on the upper die
);

  assign #1 rx = defect ? '0 : tx;

endmodule
