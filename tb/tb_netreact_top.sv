// tb_netreact_top: end-to-end test of one NETREACT switch at its default
// parameters (9 conjunction lanes, 256 sensors, 4-deep history).
//
// The control plane installs these rules (sensors a..h = IDs 1..8):
//   a, c : (a > 12 or c < 20) and (c != 10 or a == 1)
//   b    : (b in [20,60]) and (a > 12 or c < 20)   -- shares the first clause,
//                                                    read with a NOP entry
//   d, e : (d == 10 or g > 60) and (e != 10 or f < 60)
//   h    : (h > 0) and (h > 1) and ... and (h > 8)  -- one clause in each lane
// f and g are not matched by any rule: their packets are forwarded and never
// update the clauses that name them. Sensors 9..15 have no rule either.
// Random sensor and other packets are then sent back to back. Each output is
// compared with a rule-level model (forward/drop, rule flags, egress port,
// history window and moving average over the last 4 values) and must leave exactly 6 cycles after
// its packet. Non-sensor packets are checked against an L2 table model. A
// clause register is cleared mid-run. Each mechanism is counted and a
// mechanism that never occurs is a failure.
module tb_netreact_top;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  pkt_hdr_t in_hdr = '0;
  conj_wr_t conj_wr = '0;
  bitpos_wr_t bitpos_wr = '0;
  l2_wr_t l2_wr = '0;
  logic clr_en = 0; logic [3:0] clr_lane = 0; clause_id_t clr_clause_id = 0;
  logic out_valid, out_is_sensor, out_drop, out_has_rule, out_rule_true;
  pkt_hdr_t out_hdr; port_t out_port; value_t out_avg; logic [8:0] out_clause_true;
  value_t out_history [4];

  netreact_top dut (.*);

  localparam int A = 1, B = 2, C = 3, D = 4, E = 5, F = 6, G = 7, H = 8;

  // ---------------- mechanism counters ---------------------------------------
  typedef enum int { M_FWD, M_DROP, M_NORULE, M_NOP_SHARED, M_RANGE_T, M_RANGE_F, M_NINE_LANES,
                     M_L2_HIT, M_L2_MISS, M_EVICT, M_BACK2BACK, M_OTHER, M_CLEAR, M_NUM } mech_e;
  int mech [M_NUM];

  // ---------------- expected outputs ----------------------------------------
  typedef struct { longint cyc; pkt_hdr_t hdr; logic sensor, drop, has_rule, rule_true;
                   port_t port; value_t avg; value_t hw [4]; } exp_t;
  exp_t expq [$];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = expq.pop_front();
        if (cyc != e.cyc + 6) begin failures++; $display("latency %0d", cyc - e.cyc); end
        if (out_hdr !== e.hdr || out_is_sensor !== e.sensor || out_drop !== e.drop ||
            out_port !== e.port || (e.sensor && (out_has_rule !== e.has_rule ||
            out_rule_true !== e.rule_true || out_avg !== e.avg || out_history != e.hw))) begin
          failures++;
          if (failures < 10)
            $display("mismatch sensor %0d v=%0d: drop %b/%b rule %b/%b port %0d/%0d avg %0d/%0d",
                     e.hdr.sensor_id, e.hdr.sensor_value, out_drop, e.drop, out_rule_true,
                     e.rule_true, out_port, e.port, out_avg, e.avg);
        end
      end
    end
  end

  // ---------------- control plane helpers ------------------------------------
  int bp_slot [9];
  task automatic clause(int lane, int s, int cid, op_e op, int a, int b, int pos);
    @(negedge clk);
    conj_wr = '{en: 1'b1, lane: 4'(lane), sensor_id: sensor_id_t'(s),
                entry: '{valid: 1'b1, clause_id: clause_id_t'(cid), op: op, opnd_a: a, opnd_b: b}};
    if (pos >= 0) begin
      bitpos_wr = '{en: 1'b1, lane: 4'(lane), index: 8'(bp_slot[lane]), valid: 1'b1,
                    sensor_id: sensor_id_t'(s), clause_id: clause_id_t'(cid), bitpos: bitpos_t'(pos)};
      bp_slot[lane]++;
    end
    @(negedge clk);
    conj_wr = '0; bitpos_wr = '0;
  endtask

  // ---------------- reference model -------------------------------------------
  logic pa_gt12, pc_lt20, pc_ne10, pa_eq1, pb_rng, pd_eq10, pe_ne10;
  longint hist [16][4];
  logic [47:0] l2_mac [4] = '{48'h0a0000000001, 48'h0a0000000002, 48'h0a0000000003, 48'h0a0000000004};
  port_t       l2_port [4] = '{9'd3, 9'd7, 9'd12, 9'd200};

  function automatic value_t avg_of(int s);
    longint sum = hist[s][0] + hist[s][1] + hist[s][2] + hist[s][3];
    return value_t'((sum - ((sum % 4 + 4) % 4)) / 4);
  endfunction

  int last_s = -1;
  task automatic send_sensor(int s, value_t v);
    exp_t e; logic pass, has;
    for (int k = 3; k > 0; k--) hist[s][k] = hist[s][k-1];
    hist[s][0] = longint'(v);
    if (hist[s][3] != 0) mech[M_EVICT]++;
    has = 1;
    case (s)
      A, C: begin
        if (s == A) begin pa_gt12 = v > 12; pa_eq1 = v == 1; end
        else        begin pc_lt20 = v < 20; pc_ne10 = v != 10; end
        pass = (pa_gt12 || pc_lt20) && (pc_ne10 || pa_eq1);
      end
      B: begin
        pb_rng = v >= 20 && v <= 60;
        if (pb_rng) mech[M_RANGE_T]++; else mech[M_RANGE_F]++;
        mech[M_NOP_SHARED]++;
        pass = pb_rng && (pa_gt12 || pc_lt20);
      end
      D, E: begin
        if (s == D) pd_eq10 = v == 10; else pe_ne10 = v != 10;
        pass = pd_eq10 && pe_ne10;     // g > 60 and f < 60 are never evaluated here
      end
      H: begin pass = v > 8; mech[M_NINE_LANES]++; end
      default: begin pass = 1; has = 0; mech[M_NORULE]++; end
    endcase
    if (has) mech[pass ? M_FWD : M_DROP]++;
    if (s == last_s) mech[M_BACK2BACK]++;
    last_s = s;
    in_valid = 1;
    in_hdr = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    in_hdr.ether_type = 16'h0800; in_hdr.ip_proto = 8'd17; in_hdr.udp_dport = 16'd50000;
    in_hdr.sensor_id = sensor_id_t'(s); in_hdr.sensor_value = v;
    e.cyc = cyc; e.hdr = in_hdr; e.sensor = 1; e.drop = !pass; e.has_rule = has;
    e.rule_true = has && pass; e.port = 9'd64; e.avg = avg_of(s);
    for (int k = 0; k < 4; k++) e.hw[k] = value_t'(hist[s][k]);
    expq.push_back(e);
  endtask

  task automatic send_other();
    exp_t e; int k;
    last_s = -1;
    in_valid = 1;
    in_hdr = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    in_hdr.udp_dport = 16'd80;
    k = $urandom_range(0, 5);
    if (k < 4) in_hdr.dst_mac = l2_mac[k];
    e.cyc = cyc; e.hdr = in_hdr; e.sensor = 0; e.drop = 0; e.has_rule = 0; e.rule_true = 0;
    e.port = (k < 4) ? l2_port[k] : 9'd511; e.avg = 0;
    mech[k < 4 ? M_L2_HIT : M_L2_MISS]++;
    mech[M_OTHER]++;
    expq.push_back(e);
  endtask

  function automatic value_t pick(int s);
    case ($urandom_range(0, 3))
      0: return (s == A) ? 1 : 10;
      1: return value_t'($urandom_range(0, 30));
      default: return value_t'($urandom_range(0, 80));
    endcase
  endfunction

  task automatic traffic(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 9))
        0: in_valid = 0;
        1: send_other();
        2: send_sensor(last_s > 0 ? last_s : 1, pick(last_s));
        default: begin int s; s = $urandom_range(1, 15); send_sensor(s, pick(s)); end
      endcase
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    for (int s = 0; s < 16; s++) for (int k = 0; k < 4; k++) hist[s][k] = 0;
    for (int l = 0; l < 9; l++) bp_slot[l] = 0;
    {pa_gt12, pc_lt20, pc_ne10, pa_eq1, pb_rng, pd_eq10, pe_ne10} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // lane 0, clause 1: (a > 12 or c < 20); lane 1, clause 2: (c != 10 or a == 1)
    clause(0, A, 1, OP_GT, 12, 0, 0);
    clause(0, C, 1, OP_LT, 20, 0, 1);
    clause(1, C, 2, OP_NE, 10, 0, 0);
    clause(1, A, 2, OP_EQ, 1, 0, 1);
    // b: lane 0 reads clause 1 without evaluating; lane 1, clause 3: b in [20,60]
    clause(0, B, 1, OP_NOP, 0, 0, -1);
    clause(1, B, 3, OP_RANGE, 20, 60, 0);
    // lane 0, clause 4: (d == 10 or g > 60); lane 1, clause 5: (e != 10 or f < 60)
    clause(0, D, 4, OP_EQ, 10, 0, 0);
    clause(1, D, 5, OP_NOP, 0, 0, -1);
    clause(1, E, 5, OP_NE, 10, 0, 0);
    clause(0, E, 4, OP_NOP, 0, 0, -1);
    // h: nine clauses (h > k), one per lane
    for (int l = 0; l < 9; l++) clause(l, H, 10 + l, OP_GT, l, 0, 0);
    // L2 table
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      l2_wr = '{en: 1'b1, index: 8'(k), valid: 1'b1, mac: l2_mac[k], port: l2_port[k]};
    end
    @(negedge clk); l2_wr = '0;

    traffic(3000);
    repeat (10) @(posedge clk);
    // clear clause 1 of lane 0: (a > 12 or c < 20) forgets its state
    @(negedge clk); clr_en = 1; clr_lane = 0; clr_clause_id = 1;
    @(negedge clk); clr_en = 0;
    pa_gt12 = 0; pc_lt20 = 0; mech[M_CLEAR]++;
    @(negedge clk); send_sensor(B, 30);   // range true, shared clause now false: dropped
    @(negedge clk); in_valid = 0;
    traffic(2000);
    repeat (10) @(posedge clk);

    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      $display("mechanism %s: %0d", mech_e'(m), mech[m]);
      if (mech[m] == 0) begin failures++; $display("mechanism %s never happened", mech_e'(m)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
