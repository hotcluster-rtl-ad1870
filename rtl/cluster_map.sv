// cluster_map: builds one router's cluster maps and link mode from its fault
// flags and its borrow/lend decisions.
//
// Lending comes first: each neighbour we lend to gets one of our healthy
// clusters, the internal redundant cluster first, then original clusters from
// index 3 down. The remaining healthy own clusters, then the clusters borrowed
// from neighbours, become lanes 0, 1, ... in that order. With k lanes:
//   k = 4                      -> MODE_NORMAL
//   k + (clusters lent) >= 4   -> MODE_VIRTUAL: the missing lanes use lent
//                                 clusters, time-shared with the borrower
//   k = 2 or 3                 -> MODE_SERIAL2 (lanes 0 and 1)
//   k = 1                      -> MODE_SERIAL4 (lane 0)
//   k = 0                      -> MODE_DISABLED (fault-tolerant routing)
// The mode rules follow the paper's Fig. 3 and Algorithm 2; the order in which
// clusters are chosen is this design's. Purely combinational.
module cluster_map
  import hc_pkg::*;
(
  input  logic [NPHY-1:0]        fault,        // [3:0] original, [4] redundant
  input  logic                   red_present,
  input  logic [3:0]             borrow_from,
  input  logic [3:0]             lend_to,
  output lane_map_t [NCL-1:0]    lane_map,
  output phys_map_t [NPHY-1:0]   phys_map,
  output logic [3:0][2:0]        lent_phys,    // own cluster lent towards d
  output logic [3:0]             virt_dirs,    // lent clusters used in virtual mode
  output link_mode_e             mode,
  output logic [2:0]             n_lanes       // lanes held outright (0..4)
);

  logic [NPHY-1:0] ok;

  always_comb begin
    logic [NPHY-1:0] free;
    logic [2:0]      k;
    logic [2:0]      v;
    logic [2:0]      n_lent;
    logic            placed;

    ok       = ~fault & {red_present, 4'b1111};
    placed   = 1'b0;
    k        = '0;
    v        = '0;
    mode     = MODE_DISABLED;
    free     = ok;
    lane_map = '0;
    phys_map = '0;
    lent_phys = '0;
    virt_dirs = '0;
    n_lent    = '0;

    // 1. lent clusters: redundant first, then 3 down to 0
    for (int d = 0; d < 4; d++) begin
      if (lend_to[d]) begin
        placed = 1'b0;
        for (int p = NPHY-1; p >= 0; p--) begin
          if (!placed && free[p]) begin
            free[p]          = 1'b0;
            phys_map[p].used = 1'b1;
            phys_map[p].lent = 1'b1;
            phys_map[p].idx  = 2'(d);
            lent_phys[d]     = 3'(p);
            placed           = 1'b1;
          end
        end
        n_lent = n_lent + 3'(placed);
      end
    end

    // 2. own healthy clusters, in index order
    for (int p = 0; p < NPHY; p++) begin
      if (free[p] && k < 3'd4) begin
        lane_map[k[1:0]].src = SRC_OWN;
        lane_map[k[1:0]].idx = 3'(p);
        phys_map[p].used     = 1'b1;
        phys_map[p].idx      = k[1:0];
        k = k + 3'd1;
      end
    end

    // 3. borrowed clusters
    for (int d = 0; d < 4; d++) begin
      if (borrow_from[d] && k < 3'd4) begin
        lane_map[k[1:0]].src = SRC_BORROW;
        lane_map[k[1:0]].idx = 3'(d);
        k = k + 3'd1;
      end
    end
    n_lanes = k;

    // 4. mode
    if (k == 3'd4) begin
      mode = MODE_NORMAL;
    end else if (4'(k) + 4'(n_lent) >= 4'd4) begin
      mode = MODE_VIRTUAL;
      v = k;
      for (int d = 0; d < 4; d++) begin
        if (lend_to[d] && v < 3'd4) begin
          lane_map[v[1:0]].src = SRC_VIRTUAL;
          lane_map[v[1:0]].idx = 3'(d);
          virt_dirs[d] = 1'b1;
          v = v + 3'd1;
        end
      end
    end else if (k >= 3'd2) begin
      mode = MODE_SERIAL2;
    end else if (k == 3'd1) begin
      mode = MODE_SERIAL4;
    end else begin
      mode = MODE_DISABLED;
    end
  end

endmodule
