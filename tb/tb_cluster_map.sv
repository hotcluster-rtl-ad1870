// tb_cluster_map: random fault/borrow/lend patterns against an independent
// reference. For each pattern it checks the link mode from the cluster counts
// (k = own healthy - lent + borrowed, capped at 4), that every own lane uses a
// distinct healthy cluster, that lent clusters are healthy and distinct, that
// the physical map agrees with the lane map, and the virtual-lane directions.
module tb_cluster_map;
  import hc_pkg::*;
  logic [NPHY-1:0]      fault;
  logic                 red_present;
  logic [3:0]           borrow_from, lend_to;
  lane_map_t [NCL-1:0]  lane_map;
  phys_map_t [NPHY-1:0] phys_map;
  logic [3:0][2:0]      lent_phys;
  logic [3:0]           virt_dirs;
  link_mode_e           mode;
  logic [2:0]           n_lanes;
  int checks = 0, failures = 0;
  int seen_mode [5];

  cluster_map dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s fault=%b red=%0d borrow=%b lend=%b mode=%s", what, fault,
               red_present, borrow_from, lend_to, mode.name());
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, l, b, k;
    link_mode_e exp_mode;
    logic [NPHY-1:0] used_by_lane;
    for (int n = 0; n < 3000; n++) begin
      fault       = NPHY'($urandom);
      red_present = 1'($urandom);
      borrow_from = 4'($urandom);
      lend_to     = 4'($urandom);
      if (n % 3 == 0) fault = NPHY'($urandom) & NPHY'($urandom) & NPHY'($urandom);
      if (n % 4 == 0) lend_to = lend_to & 4'($urandom);
      h = 0;
      for (int p = 0; p < 4; p++) h += !fault[p];
      h += (red_present && !fault[RED]);
      l = $countones(lend_to);
      b = $countones(borrow_from & ~lend_to);
      borrow_from = borrow_from & ~lend_to;
      if (l > h) continue;          // a finder never lends what it does not own
      #1;
      k = h - l + b;
      if (k > 4) k = 4;
      if (k == 4)            exp_mode = MODE_NORMAL;
      else if (k + l >= 4)   exp_mode = MODE_VIRTUAL;
      else if (k >= 2)       exp_mode = MODE_SERIAL2;
      else if (k == 1)       exp_mode = MODE_SERIAL4;
      else                   exp_mode = MODE_DISABLED;
      check(mode == exp_mode, "mode");
      check(int'(n_lanes) == k, "lane count");
      seen_mode[int'(exp_mode)]++;
      used_by_lane = '0;
      for (int ln = 0; ln < 4; ln++) begin
        if (lane_map[ln].src == SRC_OWN) begin
          int p;
          p = int'(lane_map[ln].idx);
          check(p < NPHY && !fault[p] && (p < 4 || red_present), "own lane on healthy cluster");
          check(!used_by_lane[p], "own cluster used once");
          used_by_lane[p] = 1'b1;
          check(phys_map[p].used && !phys_map[p].lent && int'(phys_map[p].idx) == ln, "phys map agrees");
        end else if (lane_map[ln].src == SRC_BORROW) begin
          check(borrow_from[lane_map[ln].idx[1:0]], "borrowed lane from a lender");
        end else if (lane_map[ln].src == SRC_VIRTUAL) begin
          check(mode == MODE_VIRTUAL && lend_to[lane_map[ln].idx[1:0]] &&
                virt_dirs[lane_map[ln].idx[1:0]], "virtual lane on a lent cluster");
        end else begin
          check(mode != MODE_NORMAL && mode != MODE_VIRTUAL, "no empty lane when four are needed");
        end
      end
      for (int d = 0; d < 4; d++)
        if (lend_to[d]) begin
          int p;
          p = int'(lent_phys[d]);
          check(!fault[p] && (p < 4 || red_present) && !used_by_lane[p], "lent cluster healthy and free");
          check(phys_map[p].used && phys_map[p].lent && int'(phys_map[p].idx) == d, "lent phys map");
        end
    end
    for (int m = 0; m < 5; m++) begin
      checks++;
      if (seen_mode[m] == 0) begin
        failures++;
        $display("mode %0d never exercised", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
