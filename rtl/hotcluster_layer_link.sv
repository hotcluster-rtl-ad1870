// hotcluster_layer_link: the vertical links between one ROWS x COLS layer of a
// 3D-mesh NoC and the layer above, with cluster-level TSV fault recovery.
//
// Each router's up link carries a 44-bit flit over four 11-bit TSV clusters
// placed at its four borders, optionally plus one internal redundant cluster
// (RED_MAP bit) and, with EXT_RED, one external spare cluster beyond each
// border of the layer. When clusters are defective the router first uses its
// redundant cluster, then borrows clusters of lower-weighted neighbours
// (cluster_finder), who may borrow further along a chain. A router left with
// fewer than four clusters runs in virtual-TSV mode (it time-shares the
// clusters it lent), in 2:1 or 4:1 serial mode, or disables its link so the
// NoC's fault-tolerant routing avoids it (link_mode tells the router which).
//
// Per router, on the lower die: tsv_serializer -> tsv_tx_switch -> five
// tsv_cluster models; on the upper die: tsv_rx_switch -> tsv_deserializer.
// Lateral wires between neighbouring switches carry borrowed lanes.
//
// Mapping: after reset or a remap pulse the online finders run until no
// router has a request left; map_ready then rises and traffic flows. With
// offline high, the borrow decisions come from off_borrow (computed by a host,
// e.g. by max-flow) instead. Router weights come from cfg_weight (the
// placement flow's weights) or, with use_sawi, from SAWI. Ties are broken by
// router index (router id = row*COLS + col; directions N=row-1, E=col+1,
// S=row+1, W=col-1).
//
// Assumptions of this design, not of the paper: the few control wires per
// router (beat valid, Go, link mode and maps) cross the dies on fault-free
// TSVs; tsv_fault is the fault status from an online detector, and in this
// model it also makes the TSV cluster models defective; signalling is one way
// (up). Layer size 4x4 and one redundant cluster per router are defaults.
// Without EXT_RED the borrow_map/lend_map bits that point out of the layer
// from a border router are constant zero (there is nothing to borrow from).
module hotcluster_layer_link
  import hc_pkg::*;
#(
  parameter int unsigned      ROWS    = 4,
  parameter int unsigned      COLS    = 4,
  parameter logic [ROWS*COLS-1:0] RED_MAP = '1,   // internal redundant cluster per router
  parameter bit               EXT_RED = 1'b0      // external spares at the layer border
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // lower-layer routers' up ports
  input  logic [ROWS*COLS-1:0][FLIT_W-1:0]   flit_in,
  input  logic [ROWS*COLS-1:0]               flit_in_valid,
  output logic [ROWS*COLS-1:0]               flit_in_ready,
  // upper-layer routers' down inputs
  output logic [ROWS*COLS-1:0][FLIT_W-1:0]   flit_out,
  output logic [ROWS*COLS-1:0]               flit_out_valid,
  input  logic [ROWS*COLS-1:0]               flit_out_ready,
  // fault status ([3:0] border clusters, [4] redundant) and external spares
  input  logic [ROWS*COLS-1:0][NPHY-1:0]     tsv_fault,
  input  logic [ROWS*COLS-1:0][3:0]          ext_fault,
  // mapping control
  input  logic                               remap,
  input  logic                               offline,
  input  logic [ROWS*COLS-1:0][3:0]          off_borrow,
  input  logic                               use_sawi,
  input  logic [ROWS*COLS-1:0][WW-1:0]       cfg_weight,
  // status
  output link_mode_e [ROWS*COLS-1:0]         link_mode,
  output logic [ROWS*COLS-1:0][3:0]          borrow_map,
  output logic [ROWS*COLS-1:0][3:0]          lend_map,
  output logic                               map_ready
);

  localparam int unsigned R     = ROWS * COLS;
  localparam int unsigned ID_W  = (R > 1) ? $clog2(R) : 1;
  localparam int unsigned KEY_W = WW + ID_W;

  // neighbour index of router i in direction d (valid only if it exists)
  function automatic int nbr_idx(input int i, input int d);
    int r, c;
    r = i / COLS;
    c = i % COLS;
    unique case (d)
      0:       return (r - 1) * COLS + c;
      1:       return r * COLS + c + 1;
      2:       return (r + 1) * COLS + c;
      default: return r * COLS + c - 1;
    endcase
  endfunction

  function automatic bit nbr_ok(input int i, input int d);
    int r, c;
    r = i / COLS;
    c = i % COLS;
    unique case (d)
      0:       return r > 0;
      1:       return c < COLS - 1;
      2:       return r < ROWS - 1;
      default: return c > 0;
    endcase
  endfunction

  // per-router signals
  logic [R-1:0][KEY_W-1:0]   key;
  logic [R-1:0][3:0]         req, gnt;
  logic [R-1:0][3:0]         on_borrow, on_lend;
  logic [R-1:0]              can_lend;
  logic [R-1:0][3:0]         vreq, vgnt;
  chunk_t [R-1:0][3:0]       borrow_out, lend_out;   // tx: lane to neighbour; rx: lent cluster to neighbour
  chunk_t [R-1:0][3:0]       ext_rx;                 // external spare clusters, upper die
  logic                      map_ready_q;

  assign map_ready = map_ready_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) map_ready_q <= 1'b0;
    else        map_ready_q <= !remap && (offline || (req == '0));
  end

  for (genvar i = 0; i < R; i++) begin : g_rt
    logic [2:0]              healthy;
    logic [WW-1:0]           sawi_w;
    logic [3:0][KEY_W-1:0]   nkey;
    logic [3:0]              nexist, ncan, req_in, gnt_in;
    logic [3:0]              borrow_sel, lend_sel;
    lane_map_t [NCL-1:0]     lane_map;
    phys_map_t [NPHY-1:0]    phys_map;
    logic [3:0][2:0]         lent_phys;
    logic [3:0]              virt_dirs;
    link_mode_e              mode;
    logic [2:0]              n_lanes;
    chunk_t [NCL-1:0]        lane_tx, lane_rx;
    logic                    beat_valid, rx_ready;
    logic [3:0]              vreq_in, vgnt_in;
    chunk_t [3:0]            lend_in, borrow_in;
    chunk_t [NPHY-1:0]       phys_tx, phys_rx;

    // ---- weights and online cluster finding ----
    sawi_weight #(.WW(WW)) u_sawi (.healthy(healthy), .weight(sawi_w));
    assign key[i] = {(use_sawi ? sawi_w : cfg_weight[i]), ID_W'(i)};

    for (genvar d = 0; d < 4; d++) begin : g_dir
      if (nbr_ok(i, d)) begin : g_n
        localparam int N = nbr_idx(i, d);
        assign nkey[d]      = key[N];
        assign nexist[d]    = 1'b1;
        assign ncan[d]      = can_lend[N];
        assign req_in[d]    = req[N][d ^ 2];
        assign gnt_in[d]    = gnt[N][d ^ 2];
        assign vreq_in[d]   = vreq[N][d ^ 2];
        assign vgnt_in[d]   = vgnt[N][d ^ 2];
        assign lend_in[d]   = borrow_out[N][d ^ 2];
        assign borrow_in[d] = lend_out[N][d ^ 2];
        assign borrow_sel[d] = offline ? off_borrow[i][d] : on_borrow[i][d];
        assign lend_sel[d]   = offline ? off_borrow[N][d ^ 2] : on_lend[i][d];
        assign ext_rx[i][d] = '0;
      end else begin : g_edge
        // external spare cluster: a lender of lowest weight
        assign nkey[d]      = '0;
        assign nexist[d]    = EXT_RED;
        assign ncan[d]      = EXT_RED && !ext_fault[i][d];
        assign req_in[d]    = 1'b0;
        assign gnt_in[d]    = req[i][d] && EXT_RED && !ext_fault[i][d];
        assign vreq_in[d]   = 1'b0;
        assign vgnt_in[d]   = 1'b0;
        assign lend_in[d]   = '0;
        assign borrow_sel[d] = EXT_RED && (offline ? off_borrow[i][d] : on_borrow[i][d]);
        assign lend_sel[d]   = 1'b0;
        if (EXT_RED) begin : g_ext
          tsv_cluster #(.W(CW)) u_ext (
            .tx(borrow_out[i][d]), .defect(ext_fault[i][d]), .rx(ext_rx[i][d]));
        end else begin : g_noext
          assign ext_rx[i][d] = '0;
        end
        assign borrow_in[d] = ext_rx[i][d];
      end
    end

    cluster_finder #(.KEY_W(KEY_W)) u_find (
      .clk, .rst_n, .start(remap),
      .fault(tsv_fault[i]), .red_present(RED_MAP[i]),
      .my_key(key[i]), .nbr_key(nkey), .nbr_exist(nexist),
      .req_in(req_in), .gnt_out(gnt[i]), .req_out(req[i]), .gnt_in(gnt_in),
      .nbr_can_lend(ncan), .can_lend(can_lend[i]),
      .borrow_from(on_borrow[i]), .lend_to(on_lend[i]), .healthy(healthy));

    cluster_map u_map (
      .fault(tsv_fault[i]), .red_present(RED_MAP[i]),
      .borrow_from(borrow_sel), .lend_to(lend_sel),
      .lane_map, .phys_map, .lent_phys, .virt_dirs, .mode, .n_lanes);

    assign link_mode[i]  = mode;
    assign borrow_map[i] = borrow_sel;
    assign lend_map[i]   = lend_sel;

    // ---- lower die ----
    tsv_serializer u_ser (
      .clk, .rst_n, .en(map_ready_q), .mode, .virt_dirs,
      .flit(flit_in[i]), .flit_valid(flit_in_valid[i]), .flit_ready(flit_in_ready[i]),
      .rx_ready, .lanes(lane_tx), .beat_valid,
      .vreq_out(vreq[i]), .vgnt_in, .vreq_in, .vgnt_out(vgnt[i]));

    tsv_tx_switch u_txsw (
      .lane_tx, .beat_valid, .lane_map, .phys_map, .lent_phys,
      .lend_in, .phys_tx, .borrow_out(borrow_out[i]));

    // ---- through-silicon vias ----
    for (genvar p = 0; p < NPHY; p++) begin : g_tsv
      if (p < NCL || RED_MAP[i]) begin : g_c
        tsv_cluster #(.W(CW)) u_tsv (.tx(phys_tx[p]), .defect(tsv_fault[i][p]), .rx(phys_rx[p]));
      end else begin : g_none
        assign phys_rx[p] = '0;
      end
    end

    // ---- upper die ----
    tsv_rx_switch u_rxsw (
      .phys_rx, .borrow_in, .lane_map, .lent_phys, .lend_to(lend_sel),
      .lane_rx, .lend_out(lend_out[i]));

    tsv_deserializer u_des (
      .clk, .rst_n, .en(map_ready_q), .mode, .lanes(lane_rx), .beat_valid, .rx_ready,
      .flit(flit_out[i]), .flit_valid(flit_out_valid[i]), .flit_ready(flit_out_ready[i]));
  end

endmodule
