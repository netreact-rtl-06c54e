// tb_nr_conj_lane: installs clauses of every operator for 12 sensors (some
// NOP readers of a shared clause, some without a bit position, some with no
// clause) and sends 3000 random sensor packets back to back. Each result is
// compared with a model of table, predicate, bit position and clause bitmap,
// and must appear exactly 4 cycles after its packet.
module tb_nr_conj_lane;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  sensor_id_t in_sensor_id = 0;
  value_t in_value = 0;
  logic tbl_wr_en = 0; sensor_id_t tbl_wr_sensor_id = 0; conj_entry_t tbl_wr_entry = '0;
  logic bp_wr_en = 0, bp_wr_valid = 0; logic [7:0] bp_wr_index = 0;
  sensor_id_t bp_wr_sensor_id = 0; clause_id_t bp_wr_clause_id = 0; bitpos_t bp_wr_bitpos = 0;
  logic clr_en = 0; clause_id_t clr_clause_id = 0;
  logic out_valid, out_used, out_clause_true; bitmap_t out_bitmap;
  nr_conj_lane dut (.*);

  conj_entry_t m_ent [256];
  int          m_pos [256];     // bit position of sensor s for its clause, -1: none
  bitmap_t     m_bm  [256];
  typedef struct { longint cyc; logic used; logic ct; bitmap_t bm; } exp_t;
  exp_t expq [$];
  longint cyc = 0;
  int n_true = 0, n_false = 0, n_nop = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr_clause(int s, int cid, op_e op, int a, int b, int pos);
    @(negedge clk);
    tbl_wr_en = 1; tbl_wr_sensor_id = sensor_id_t'(s);
    tbl_wr_entry = '{valid: 1'b1, clause_id: clause_id_t'(cid), op: op, opnd_a: a, opnd_b: b};
    bp_wr_en = (pos >= 0); bp_wr_valid = 1; bp_wr_index = 8'(s);
    bp_wr_sensor_id = sensor_id_t'(s); bp_wr_clause_id = clause_id_t'(cid);
    bp_wr_bitpos = bitpos_t'(pos);
    m_ent[s] = tbl_wr_entry; m_pos[s] = pos;
    @(negedge clk);
    tbl_wr_en = 0; bp_wr_en = 0;
  endtask

  // independent predicate
  function automatic logic pred(op_e op, value_t v, value_t a, value_t b);
    case (op)
      OP_GT: return v > a;
      OP_LT: return v < a;
      OP_EQ: return v == a;
      OP_NE: return v != a;
      OP_RANGE: return v >= a && v <= b;
      default: return 0;
    endcase
  endfunction

  // checker
  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = expq.pop_front();
        if (cyc != e.cyc + 4) begin failures++; $display("latency %0d", cyc - e.cyc); end
        if (out_used !== e.used || (e.used && (out_clause_true !== e.ct || out_bitmap !== e.bm))) begin
          failures++;
          if (failures < 10) $display("mismatch: used %b/%b true %b/%b bm %h/%h", out_used, e.used, out_clause_true, e.ct, out_bitmap, e.bm);
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < 256; i++) begin m_ent[i] = '0; m_pos[i] = -1; m_bm[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // clause 5: (s0 > 10) or (s1 < -3) or (s2 == 7);  s3 reads clause 5 (NOP)
    wr_clause(0, 5, OP_GT, 10, 0, 0);
    wr_clause(1, 5, OP_LT, -3, 0, 1);
    wr_clause(2, 5, OP_EQ, 7, 0, 2);
    wr_clause(3, 5, OP_NOP, 0, 0, -1);
    // clause 9: (s4 != 0) or (s5 in [20,60]); s6 has no bit position (never updates)
    wr_clause(4, 9, OP_NE, 0, 0, 3);
    wr_clause(5, 9, OP_RANGE, 20, 60, 31);
    wr_clause(6, 9, OP_GT, 0, 0, -1);
    // clause 200: (s7 in [-5,5])
    wr_clause(7, 200, OP_RANGE, -5, 5, 17);
    // sensors 8..11: no clause
    for (int i = 0; i < 3000; i++) begin
      int s; value_t v; exp_t e; logic r;
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      s = $urandom_range(0, 11);
      v = value_t'($urandom_range(0, 80)) - 10;
      in_sensor_id = sensor_id_t'(s); in_value = v;
      if (in_valid) begin
        e.cyc = cyc; e.used = m_ent[s].valid; e.ct = 0; e.bm = '0;
        if (e.used) begin
          int c;
          c = int'(m_ent[s].clause_id);
          if (m_ent[s].op != OP_NOP && m_pos[s] >= 0) begin
            r = pred(m_ent[s].op, v, m_ent[s].opnd_a, m_ent[s].opnd_b);
            if (r) m_bm[c] |= (32'd1 << m_pos[s]); else m_bm[c] &= ~(32'd1 << m_pos[s]);
          end else n_nop++;
          e.bm = m_bm[c]; e.ct = (m_bm[c] != 0);
          if (e.ct) n_true++; else n_false++;
        end
        expq.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
    checks++; if (n_true < 100 || n_false < 100 || n_nop < 50) begin failures++; $display("coverage %0d %0d %0d", n_true, n_false, n_nop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
