// tb_netreact_shared: a rule set in which clauses are shared between rules
// of different sensors, run on one switch at default parameters:
//   b    : (b < 5)  and (a > 10)
//   a, c : (a > 10) and (e > 16) and (c > 10)
//   d, e : (d < 7)  and (e > 16)
// (a > 10) is fed by a packets and read by b packets; (e > 16) is fed by e
// packets and read by a and c packets. Placement: lane 0 clause 1 = (a > 10),
// lane 1 clause 2 = (e > 16), lane 2 clause 3 = (c > 10), lane 0 clause 4 =
// (d < 7), lane 2 clause 5 = (b < 5). Random packets of sensors a..e are sent
// back to back and every forward/drop decision is compared with a rule-level
// model that keeps the latest truth value of each predicate.
module tb_netreact_shared;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  pkt_hdr_t in_hdr = '0;
  conj_wr_t conj_wr = '0;
  bitpos_wr_t bitpos_wr = '0;
  logic out_valid, out_is_sensor, out_drop, out_has_rule, out_rule_true;
  pkt_hdr_t out_hdr; port_t out_port; value_t out_avg; logic [8:0] out_clause_true;
  value_t out_history [4];

  netreact_top dut (.clk, .rst_n, .in_valid, .in_hdr, .conj_wr, .bitpos_wr, .l2_wr('0),
                    .clr_en(1'b0), .clr_lane(4'd0), .clr_clause_id('0), .out_valid, .out_hdr,
                    .out_is_sensor, .out_drop, .out_port, .out_has_rule, .out_rule_true,
                    .out_avg, .out_history, .out_clause_true);

  localparam int A = 1, B = 2, C = 3, D = 4, E = 5;

  logic expq [$];
  int n_fwd = 0, n_drop = 0, n_shared_true = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      checks++;
      if (expq.size() == 0) failures++;
      else begin
        logic e; e = expq.pop_front();
        if (out_drop !== !e) begin
          failures++;
          if (failures < 10) $display("sensor %0d v=%0d: drop %b expected %b", out_hdr.sensor_id, out_hdr.sensor_value, out_drop, !e);
        end
      end
    end
  end

  int slot [9];
  task automatic clause(int lane, int s, int cid, op_e op, int a, int pos);
    @(negedge clk);
    conj_wr = '{en: 1'b1, lane: 4'(lane), sensor_id: sensor_id_t'(s),
                entry: '{valid: 1'b1, clause_id: clause_id_t'(cid), op: op, opnd_a: a, opnd_b: 0}};
    if (pos >= 0) begin
      bitpos_wr = '{en: 1'b1, lane: 4'(lane), index: 8'(slot[lane]), valid: 1'b1,
                    sensor_id: sensor_id_t'(s), clause_id: clause_id_t'(cid), bitpos: bitpos_t'(pos)};
      slot[lane]++;
    end
    @(negedge clk);
    conj_wr = '0; bitpos_wr = '0;
  endtask

  logic p_a10, p_e16, p_c10, p_d7, p_b5;
  initial begin
    for (int l = 0; l < 9; l++) slot[l] = 0;
    {p_a10, p_e16, p_c10, p_d7, p_b5} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    clause(0, A, 1, OP_GT, 10, 0);  clause(1, A, 2, OP_NOP, 0, -1); clause(2, A, 3, OP_NOP, 0, -1);
    clause(0, C, 1, OP_NOP, 0, -1); clause(1, C, 2, OP_NOP, 0, -1); clause(2, C, 3, OP_GT, 10, 0);
    clause(0, B, 1, OP_NOP, 0, -1); clause(2, B, 5, OP_LT, 5, 0);
    clause(0, D, 4, OP_LT, 7, 0);   clause(1, D, 2, OP_NOP, 0, -1);
    clause(0, E, 4, OP_NOP, 0, -1); clause(1, E, 2, OP_GT, 16, 0);
    for (int i = 0; i < 3000; i++) begin
      int s; value_t v; logic pass;
      @(negedge clk);
      s = $urandom_range(A, E);
      v = value_t'($urandom_range(0, 25));
      case (s)
        A: begin p_a10 = v > 10; pass = p_a10 && p_e16 && p_c10; end
        C: begin p_c10 = v > 10; pass = p_a10 && p_e16 && p_c10; end
        B: begin p_b5 = v < 5;   pass = p_b5 && p_a10; end
        D: begin p_d7 = v < 7;   pass = p_d7 && p_e16; end
        default: begin p_e16 = v > 16; pass = p_d7 && p_e16; end
      endcase
      if ((s == B && p_a10) || ((s == A || s == C) && p_e16)) n_shared_true++;
      if (pass) n_fwd++; else n_drop++;
      in_valid = 1;
      in_hdr = '0;
      in_hdr.ether_type = 16'h0800; in_hdr.ip_proto = 8'd17; in_hdr.udp_dport = 16'd50000;
      in_hdr.sensor_id = sensor_id_t'(s); in_hdr.sensor_value = v;
      expq.push_back(pass);
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_fwd < 50 || n_drop < 50 || n_shared_true < 50) begin
      failures++; $display("coverage: fwd %0d drop %0d shared %0d left %0d", n_fwd, n_drop, n_shared_true, expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
