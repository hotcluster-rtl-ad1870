// sweep_unit: testbench helper that runs a Monte-Carlo defect-rate sweep on
// one hotcluster_layer_link configuration (layer size, internal and external
// redundancy), with no traffic, only mapping.
//
// For each defect rate in RATES and each of SAMPLES samples, every cluster
// (the four original ones, the internal redundant one and the external spares
// where present) is made defective with that probability. The layer is then
// mapped twice: online, by the hardware with SAWI weights, and offline, with
// a borrow map computed here the way a host would, by Edmonds-Karp max flow
// (shortest augmenting paths). The flow graph has a source edge of capacity
// "clusters missing" into each router, a sink edge of capacity "spare
// clusters" (own beyond four plus healthy external spares) out of it, and a
// capacity-1 edge from each router to each neighbour it may borrow from. Each
// router is split into an in and an out node joined by an edge of capacity
// "own healthy clusters", because a router can only lend clusters it owns.
//
// Per sample it checks, for both maps, that borrow and lend maps agree and
// each mode follows from the cluster counts, that the offline map leaves
// exactly (clusters missing - max flow) clusters missing, and that it never
// leaves more missing than the online map. It prints, per rate, the share of
// routers in normal, virtual, serial and disabled mode for both maps.
module sweep_unit
  import hc_pkg::*;
#(
  parameter int unsigned ROWS    = 4,
  parameter int unsigned COLS    = 4,
  parameter bit          INT_RED = 1'b1,
  parameter bit          EXT     = 1'b0,
  parameter int unsigned SAMPLES = 50,
  parameter string       NAME    = "int.red."
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int R  = ROWS * COLS;
  localparam int NN = 2 + 2 * R;          // s, t, in/out per router
  localparam int NRATES = 6;
  localparam int RATES [NRATES] = '{5, 10, 20, 30, 40, 50};

  logic [R-1:0][FLIT_W-1:0] flit_in, flit_out;
  logic [R-1:0] flit_in_valid, flit_in_ready, flit_out_valid, flit_out_ready;
  logic [R-1:0][NPHY-1:0] tsv_fault;
  logic [R-1:0][3:0] ext_fault, off_borrow, borrow_map, lend_map;
  logic remap, offline, use_sawi, map_ready;
  logic [R-1:0][WW-1:0] cfg_weight;
  link_mode_e [R-1:0] link_mode;

  hotcluster_layer_link #(.ROWS(ROWS), .COLS(COLS), .RED_MAP(INT_RED ? '1 : '0), .EXT_RED(EXT)) dut (.*);

  assign flit_in = '0;
  assign flit_in_valid = '0;
  assign flit_out_ready = '1;
  assign cfg_weight = '0;

  int res [NN][NN];
  int cap [NN][NN];

  function automatic int nb(input int i, input int d);
    int r, c;
    r = i / COLS; c = i % COLS;
    case (d)
      0: return (r > 0) ? i - COLS : -1;
      1: return (c < COLS - 1) ? i + 1 : -1;
      2: return (r < ROWS - 1) ? i + COLS : -1;
      default: return (c > 0) ? i - 1 : -1;
    endcase
  endfunction

  function automatic int own_healthy(input int i);
    int h;
    h = 0;
    for (int p = 0; p < 4; p++) h += !tsv_fault[i][p];
    if (INT_RED) h += !tsv_fault[i][RED];
    return h;
  endfunction

  function automatic int ext_healthy(input int i);
    int e;
    e = 0;
    if (EXT) for (int d = 0; d < 4; d++) if (nb(i, d) < 0 && !ext_fault[i][d]) e++;
    return e;
  endfunction

  // Edmonds-Karp; returns the max flow and fills off_borrow
  task automatic host_maxflow(output int flow);
    int prev [NN];
    int q [$];
    flow = 0;
    for (int u = 0; u < NN; u++) for (int v = 0; v < NN; v++) cap[u][v] = 0;
    for (int i = 0; i < R; i++) begin
      int h, in_n, out_n;
      h = own_healthy(i);
      in_n = 2 + 2 * i; out_n = 3 + 2 * i;
      cap[0][out_n] = (h < 4) ? 4 - h : 0;
      cap[out_n][1] = ((h > 4) ? h - 4 : 0) + ext_healthy(i);
      cap[in_n][out_n] = h;
      for (int d = 0; d < 4; d++) if (nb(i, d) >= 0) cap[out_n][2 + 2 * nb(i, d)] = 1;
    end
    for (int u = 0; u < NN; u++) for (int v = 0; v < NN; v++) res[u][v] = cap[u][v];
    forever begin
      int u;
      for (int k = 0; k < NN; k++) prev[k] = -1;
      prev[0] = 0;
      q.delete();
      q.push_back(0);
      while (q.size() > 0 && prev[1] < 0) begin
        u = q.pop_front();
        for (int v = 0; v < NN; v++)
          if (prev[v] < 0 && res[u][v] > 0) begin
            prev[v] = u;
            q.push_back(v);
          end
      end
      if (prev[1] < 0) break;
      for (int v = 1; v != 0; v = prev[v]) begin
        res[prev[v]][v] -= 1;
        res[v][prev[v]] += 1;
      end
      flow++;
    end
    off_borrow = '0;
    for (int i = 0; i < R; i++) begin
      int out_n, used_t, spare_own, h;
      out_n = 3 + 2 * i;
      for (int d = 0; d < 4; d++)
        if (nb(i, d) >= 0 && cap[out_n][2 + 2 * nb(i, d)] - res[out_n][2 + 2 * nb(i, d)] > 0)
          off_borrow[i][d] = 1'b1;
      // sink flow beyond the own spare comes from external spares
      h = own_healthy(i);
      spare_own = (h > 4) ? h - 4 : 0;
      used_t = cap[out_n][1] - res[out_n][1] - spare_own;
      for (int d = 0; d < 4; d++)
        if (EXT && used_t > 0 && nb(i, d) < 0 && !ext_fault[i][d]) begin
          off_borrow[i][d] = 1'b1;
          used_t--;
        end
    end
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [%s %0dx%0d] %s at %0t", NAME, ROWS, COLS, what, $time);
    end
  endtask

  task automatic do_map();
    @(negedge clk); remap = 1;
    @(negedge clk); remap = 0;
    for (int t = 0; t < 400 && !map_ready; t++) @(negedge clk);
    check(map_ready, "mapping settles");
  endtask

  // checks one map, tallies modes, returns clusters still missing
  task automatic tally(inout int cnt [5], output int missing);
    missing = 0;
    for (int i = 0; i < R; i++) begin
      int h, b, l, k;
      link_mode_e m;
      h = own_healthy(i);
      b = $countones(borrow_map[i]);
      l = $countones(lend_map[i]);
      k = (h - l + b > 4) ? 4 : h - l + b;
      m = (k == 4) ? MODE_NORMAL : (k + l >= 4) ? MODE_VIRTUAL : (k >= 2) ? MODE_SERIAL2 :
          (k == 1) ? MODE_SERIAL4 : MODE_DISABLED;
      if (link_mode[i] != m || l > h) begin
        failures++;
        $display("FAIL [%s] router %0d mode %s, counts give %s", NAME, i, link_mode[i].name(), m.name());
      end
      for (int d = 0; d < 4; d++)
        if (nb(i, d) >= 0 && borrow_map[i][d] != lend_map[nb(i, d)][d ^ 2]) begin
          failures++;
          $display("FAIL [%s] router %0d dir %0d borrow/lend disagree", NAME, i, d);
        end
      checks++;
      cnt[int'(link_mode[i])]++;
      missing += 4 - k;
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    remap = 0; offline = 0; use_sawi = 1; tsv_fault = '0; ext_fault = '0; off_borrow = '0;
    @(posedge rst_n);
    for (int ri = 0; ri < NRATES; ri++) begin
      int on_cnt [5];
      int ff_cnt [5];
      int total;
      for (int m = 0; m < 5; m++) begin on_cnt[m] = 0; ff_cnt[m] = 0; end
      for (int s = 0; s < SAMPLES; s++) begin
        int flow, need, miss_on, miss_ff;
        for (int i = 0; i < R; i++) begin
          for (int p = 0; p < NPHY; p++) tsv_fault[i][p] = ($urandom % 100) < RATES[ri];
          for (int d = 0; d < 4; d++) ext_fault[i][d] = ($urandom % 100) < RATES[ri];
        end
        need = 0;
        for (int i = 0; i < R; i++) need += (own_healthy(i) < 4) ? 4 - own_healthy(i) : 0;
        offline = 0;
        do_map();
        tally(on_cnt, miss_on);
        host_maxflow(flow);
        offline = 1;
        do_map();
        tally(ff_cnt, miss_ff);
        check(miss_ff == need - flow, $sformatf("offline map leaves %0d missing, max flow says %0d", miss_ff, need - flow));
        check(miss_ff <= miss_on, $sformatf("max flow (%0d missing) no worse than online (%0d)", miss_ff, miss_on));
      end
      total = SAMPLES * R;
      $display("[%-8s %0dx%0d] defect %2d%%  SAWI: normal %5.1f%% virtual %5.1f%% serial %5.1f%% disabled %5.2f%% | FF: normal %5.1f%% virtual %5.1f%% serial %5.1f%% disabled %5.2f%%",
               NAME, ROWS, COLS, RATES[ri],
               100.0 * on_cnt[0] / total, 100.0 * on_cnt[1] / total, 100.0 * (on_cnt[2] + on_cnt[3]) / total, 100.0 * on_cnt[4] / total,
               100.0 * ff_cnt[0] / total, 100.0 * ff_cnt[1] / total, 100.0 * (ff_cnt[2] + ff_cnt[3]) / total, 100.0 * ff_cnt[4] / total);
    end
    done = 1;
  end
endmodule
