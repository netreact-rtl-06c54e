// tb_netreact_tree: rule disaggregation over two switches of a tree.
//
// A leaf switch forwards the sensor packets it does not drop to a root switch
// (its controller port). The rules of the end-to-end test are split so that
// no packet is dropped too early:
//   leaf : a, c : (a > 12 or c < 20) and (c != 10 or a == 1)
//          b    : (b in [20,60]) and (a > 12 or c < 20)
//          h    : (h > 0) and ... and (h > 8)       nine clauses
//   root : d, e : (d == 10 or g > 60) and (e != 10 or f < 60)
//          h    : (h > 9) and ... and (h > 17)      nine more clauses
// A third switch, the central reference, holds all rules on sensors a..g in
// one node. For every sensor packet the testbench checks that the root
// delivers it exactly when the central switch forwards it, and that the
// 18-clause rule on h, which no single switch can hold, delivers h exactly
// when h > 17. Sequence numbers travel in the source MAC field.
module tb_netreact_tree;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NPKT = 4000;
  localparam int A = 1, B = 2, C = 3, D = 4, E = 5, H = 8;

  logic in_valid = 0;
  pkt_hdr_t in_hdr = '0;
  conj_wr_t cw [3];
  bitpos_wr_t bw [3];
  l2_wr_t l2_none = '0;

  logic       v_o [3], s_o [3], d_o [3], hr_o [3], rt_o [3];
  pkt_hdr_t   h_o [3];
  port_t      p_o [3];
  value_t     a_o [3];
  logic [8:0] ct_o [3];
  value_t     hw_o [3][4];

  // 0: leaf, 1: root, 2: central
  netreact_top u_leaf (
    .clk, .rst_n, .in_valid, .in_hdr, .conj_wr(cw[0]), .bitpos_wr(bw[0]), .l2_wr(l2_none),
    .clr_en(1'b0), .clr_lane(4'd0), .clr_clause_id('0),
    .out_valid(v_o[0]), .out_hdr(h_o[0]), .out_is_sensor(s_o[0]), .out_drop(d_o[0]),
    .out_port(p_o[0]), .out_has_rule(hr_o[0]), .out_rule_true(rt_o[0]), .out_avg(a_o[0]),
    .out_clause_true(ct_o[0]), .out_history(hw_o[0]));
  netreact_top u_root (
    .clk, .rst_n, .in_valid(v_o[0] && s_o[0] && !d_o[0] && p_o[0] == 9'd64), .in_hdr(h_o[0]),
    .conj_wr(cw[1]), .bitpos_wr(bw[1]), .l2_wr(l2_none),
    .clr_en(1'b0), .clr_lane(4'd0), .clr_clause_id('0),
    .out_valid(v_o[1]), .out_hdr(h_o[1]), .out_is_sensor(s_o[1]), .out_drop(d_o[1]),
    .out_port(p_o[1]), .out_has_rule(hr_o[1]), .out_rule_true(rt_o[1]), .out_avg(a_o[1]),
    .out_clause_true(ct_o[1]), .out_history(hw_o[1]));
  netreact_top u_central (
    .clk, .rst_n, .in_valid, .in_hdr, .conj_wr(cw[2]), .bitpos_wr(bw[2]), .l2_wr(l2_none),
    .clr_en(1'b0), .clr_lane(4'd0), .clr_clause_id('0),
    .out_valid(v_o[2]), .out_hdr(h_o[2]), .out_is_sensor(s_o[2]), .out_drop(d_o[2]),
    .out_port(p_o[2]), .out_has_rule(hr_o[2]), .out_rule_true(rt_o[2]), .out_avg(a_o[2]),
    .out_clause_true(ct_o[2]), .out_history(hw_o[2]));

  logic root_dlv [NPKT], central_fwd [NPKT], seen_root [NPKT], seen_central [NPKT];
  int   sid_of [NPKT];
  value_t val_of [NPKT];

  always @(posedge clk) begin
    #1;
    if (v_o[1] && s_o[1]) begin
      int q; q = int'(h_o[1].src_mac);
      seen_root[q] = 1; root_dlv[q] = !d_o[1];
    end
    if (v_o[2] && s_o[2]) begin
      int q; q = int'(h_o[2].src_mac);
      seen_central[q] = 1; central_fwd[q] = !d_o[2];
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int bp_slot [3][9];
  task automatic clause(int node, int lane, int s, int cid, op_e op, int a, int b, int pos);
    @(negedge clk);
    cw[node] = '{en: 1'b1, lane: 4'(lane), sensor_id: sensor_id_t'(s),
                 entry: '{valid: 1'b1, clause_id: clause_id_t'(cid), op: op, opnd_a: a, opnd_b: b}};
    if (pos >= 0) begin
      bw[node] = '{en: 1'b1, lane: 4'(lane), index: 8'(bp_slot[node][lane]), valid: 1'b1,
                   sensor_id: sensor_id_t'(s), clause_id: clause_id_t'(cid), bitpos: bitpos_t'(pos)};
      bp_slot[node][lane]++;
    end
    @(negedge clk);
    cw[node] = '0; bw[node] = '0;
  endtask

  task automatic rules_abc(int node);
    clause(node, 0, A, 1, OP_GT, 12, 0, 0);
    clause(node, 0, C, 1, OP_LT, 20, 0, 1);
    clause(node, 1, C, 2, OP_NE, 10, 0, 0);
    clause(node, 1, A, 2, OP_EQ, 1, 0, 1);
    clause(node, 0, B, 1, OP_NOP, 0, 0, -1);
    clause(node, 1, B, 3, OP_RANGE, 20, 60, 0);
  endtask
  task automatic rules_de(int node);
    clause(node, 0, D, 4, OP_EQ, 10, 0, 0);
    clause(node, 1, D, 5, OP_NOP, 0, 0, -1);
    clause(node, 1, E, 5, OP_NE, 10, 0, 0);
    clause(node, 0, E, 4, OP_NOP, 0, 0, -1);
  endtask

  int n_leaf_drop = 0, n_root_drop = 0, n_h_pass = 0, n_h_drop = 0, n_pass = 0;
  always @(posedge clk) begin
    #2;
    if (v_o[0] && s_o[0] && d_o[0]) n_leaf_drop++;
    if (v_o[1] && s_o[1] && d_o[1]) n_root_drop++;
  end

  initial begin
    for (int n = 0; n < 3; n++) begin
      cw[n] = '0; bw[n] = '0;
      for (int l = 0; l < 9; l++) bp_slot[n][l] = 0;
    end
    for (int q = 0; q < NPKT; q++) begin seen_root[q] = 0; seen_central[q] = 0; root_dlv[q] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    rules_abc(0); rules_de(1);
    rules_abc(2); rules_de(2);
    for (int l = 0; l < 9; l++) clause(0, l, H, 10 + l, OP_GT, l, 0, 0);
    for (int l = 0; l < 9; l++) clause(1, l, H, 10 + l, OP_GT, 9 + l, 0, 0);

    for (int q = 0; q < NPKT; q++) begin
      int s; value_t v;
      @(negedge clk);
      s = $urandom_range(1, 8);
      case ($urandom_range(0, 3))
        0: v = (s == A) ? 1 : 10;
        1: v = value_t'($urandom_range(0, 30));
        default: v = value_t'($urandom_range(0, 80));
      endcase
      sid_of[q] = s; val_of[q] = v;
      in_valid = 1;
      in_hdr = '0;
      in_hdr.ether_type = 16'h0800; in_hdr.ip_proto = 8'd17; in_hdr.udp_dport = 16'd50000;
      in_hdr.src_mac = 48'(q); in_hdr.sensor_id = sensor_id_t'(s); in_hdr.sensor_value = v;
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(posedge clk);

    for (int q = 0; q < NPKT; q++) begin
      logic exp_dlv;
      checks++;
      if (!seen_central[q]) begin failures++; continue; end
      if (sid_of[q] == H) begin
        exp_dlv = val_of[q] > 17;
        if (exp_dlv) n_h_pass++; else n_h_drop++;
      end else exp_dlv = central_fwd[q];
      if (exp_dlv) n_pass++;
      if ((seen_root[q] && root_dlv[q]) != exp_dlv) begin
        failures++;
        if (failures < 10) $display("packet %0d sensor %0d v=%0d: root %b expected %b", q, sid_of[q], val_of[q], seen_root[q] && root_dlv[q], exp_dlv);
      end
    end
    $display("leaf drops %0d, root drops %0d, delivered %0d, h delivered %0d / dropped %0d",
             n_leaf_drop, n_root_drop, n_pass, n_h_pass, n_h_drop);
    checks++;
    if (n_leaf_drop == 0 || n_root_drop == 0 || n_h_pass == 0 || n_h_drop == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
