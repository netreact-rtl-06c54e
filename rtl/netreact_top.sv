// netreact_top: one NETREACT switch pipeline for event detection on sensor
// data streams.
//
// Every packet is first classified (nr_parser). Other traffic is L2-forwarded
// (nr_l2_fwd). A sensor packet carries one sensor ID and one value; its
// filtering rule is a CNF expression whose clauses are spread over N_CONJ
// conjunction lanes (nr_conj_lane), each holding at most one clause per
// sensor, evaluated in parallel. Each lane looks its clause up by sensor ID,
// decides the predicate from the sign of operand minus value, and merges the
// result into the clause's bitmap register. nr_cnf_eval ANDs the lane results:
// a true rule forwards the packet to CTRL_PORT (the controller or the next
// switch towards it), a false one drops it. Alongside, every sensor value
// enters a per-sensor history queue (nr_history) and a moving average
// (nr_moving_avg); both are reported with the packet (out_history, out_avg).
//
// The lane organisation (one table and one register array per clause of a
// rule, 9 lanes, 32-bit bitmaps), the operators and the merging follow the
// document; the table write ports, widths, timing and port numbers are this
// design's own.
//
// Timing: one packet per cycle, never stalls. A packet entering at cycle t
// leaves at t+6: parser 1, lane 4, CNF evaluation 1. State written by one
// packet is seen by the next packet in the next cycle, so back-to-back
// packets of the same sensor are evaluated in order.
module netreact_top
  import nr_pkg::*;
#(
  parameter int unsigned   N_CONJ          = 9,
  parameter int unsigned   BITPOS_DEPTH    = 256,
  parameter int unsigned   HIST_DEPTH      = 4,
  parameter int unsigned   L2_DEPTH        = 64,
  parameter logic [15:0]   SENSOR_UDP_PORT = 16'd50000,
  parameter port_t         CTRL_PORT       = 9'd64,
  parameter port_t         MISS_PORT       = 9'd511
) (
  input  logic       clk,
  input  logic       rst_n,
  // packets in
  input  logic       in_valid,
  input  pkt_hdr_t   in_hdr,
  // control plane
  input  conj_wr_t   conj_wr,
  input  bitpos_wr_t bitpos_wr,
  input  l2_wr_t     l2_wr,
  input  logic       clr_en,
  input  logic [3:0] clr_lane,
  input  clause_id_t clr_clause_id,
  // packets out (one per input packet, 6 cycles later)
  output logic       out_valid,
  output pkt_hdr_t   out_hdr,
  output logic       out_is_sensor,
  output logic       out_drop,
  output port_t      out_port,
  output logic       out_has_rule,
  output logic       out_rule_true,
  output value_t     out_avg,
  output value_t     out_history [HIST_DEPTH],   // sensor's last values, newest first
  output logic [N_CONJ-1:0] out_clause_true
);

  localparam int unsigned LAT = 6;

  // ---------------- classification ----------------------------------------
  logic     p_valid, p_sensor;
  pkt_hdr_t p_hdr;
  nr_parser #(.SENSOR_UDP_PORT(SENSOR_UDP_PORT)) u_parser (
    .clk, .rst_n, .in_valid, .in_hdr,
    .out_valid(p_valid), .out_is_sensor(p_sensor), .out_hdr(p_hdr)
  );

  // ---------------- conjunction lanes --------------------------------------
  logic [N_CONJ-1:0] l_valid, l_used, l_true;
  for (genvar i = 0; i < N_CONJ; i++) begin : g_lane
    bitmap_t bm;
    nr_conj_lane #(.BITPOS_DEPTH(BITPOS_DEPTH)) u_lane (
      .clk, .rst_n,
      .in_valid(p_sensor), .in_sensor_id(p_hdr.sensor_id), .in_value(p_hdr.sensor_value),
      .tbl_wr_en(conj_wr.en && conj_wr.lane == 4'(i)),
      .tbl_wr_sensor_id(conj_wr.sensor_id), .tbl_wr_entry(conj_wr.entry),
      .bp_wr_en(bitpos_wr.en && bitpos_wr.lane == 4'(i)),
      .bp_wr_index(bitpos_wr.index), .bp_wr_valid(bitpos_wr.valid),
      .bp_wr_sensor_id(bitpos_wr.sensor_id), .bp_wr_clause_id(bitpos_wr.clause_id),
      .bp_wr_bitpos(bitpos_wr.bitpos),
      .clr_en(clr_en && clr_lane == 4'(i)), .clr_clause_id,
      .out_valid(l_valid[i]), .out_used(l_used[i]), .out_clause_true(l_true[i]),
      .out_bitmap(bm)
    );
  end

  logic c_valid, c_has_rule, c_rule_true, c_pass;
  nr_cnf_eval #(.N_CONJ(N_CONJ)) u_cnf (
    .clk, .rst_n, .in_valid(l_valid[0]), .in_used(l_used), .in_clause_true(l_true),
    .out_valid(c_valid), .out_has_rule(c_has_rule), .out_rule_true(c_rule_true),
    .out_pass(c_pass)
  );

  logic [N_CONJ-1:0] c_clause_true;
  nr_delay #(.W(N_CONJ), .N(1)) u_dly_ct (.clk, .rst_n, .in(l_true), .out(c_clause_true));

  // ---------------- history and moving average -----------------------------
  logic       h_valid;
  sensor_id_t h_sid;
  value_t     h_val, h_evicted;
  value_t     h_window [HIST_DEPTH];
  nr_history #(.DEPTH(HIST_DEPTH)) u_hist (
    .clk, .rst_n, .in_valid(p_sensor), .in_sensor_id(p_hdr.sensor_id),
    .in_value(p_hdr.sensor_value),
    .out_valid(h_valid), .out_sensor_id(h_sid), .out_value(h_val),
    .out_evicted(h_evicted), .out_window(h_window)
  );

  logic       a_valid;
  sensor_id_t a_sid;
  value_t     a_avg;
  nr_moving_avg #(.WINDOW(HIST_DEPTH)) u_avg (
    .clk, .rst_n, .in_valid(h_valid), .in_sensor_id(h_sid), .in_value(h_val),
    .in_evicted(h_evicted),
    .out_valid(a_valid), .out_sensor_id(a_sid), .out_avg(a_avg)
  );

  // history window travels with the packet: packed, delayed, unpacked
  logic [HIST_DEPTH*VALUE_W-1:0] hw_packed, hw_d;
  always_comb
    for (int k = 0; k < HIST_DEPTH; k++) hw_packed[k*VALUE_W +: VALUE_W] = h_window[k];
  nr_delay #(.W(HIST_DEPTH * VALUE_W), .N(LAT - 2)) u_dly_hw (.clk, .rst_n, .in(hw_packed), .out(hw_d));

  value_t avg_d;
  nr_delay #(.W(VALUE_W), .N(LAT - 3)) u_dly_avg (.clk, .rst_n, .in(a_avg), .out(avg_d));

  // ---------------- L2 forwarding of other traffic -------------------------
  logic  l2_hit;
  port_t l2_port, l2_port_d;
  nr_l2_fwd #(.DEPTH(L2_DEPTH), .MISS_PORT(MISS_PORT)) u_l2 (
    .clk, .rst_n,
    .wr_en(l2_wr.en), .wr_index(l2_wr.index), .wr_valid(l2_wr.valid),
    .wr_mac(l2_wr.mac), .wr_port(l2_wr.port),
    .lk_mac(p_hdr.dst_mac), .out_hit(l2_hit), .out_port(l2_port)
  );
  nr_delay #(.W(PORT_W), .N(LAT - 2)) u_dly_l2 (.clk, .rst_n, .in(l2_port), .out(l2_port_d));

  // ---------------- packet fields alongside ---------------------------------
  pkt_hdr_t hdr_d;
  logic     sensor_d, valid_d;
  nr_delay #(.W($bits(pkt_hdr_t) + 2), .N(LAT - 1)) u_dly_hdr (
    .clk, .rst_n, .in({p_hdr, p_sensor, p_valid}), .out({hdr_d, sensor_d, valid_d})
  );

  // ---------------- egress decision -----------------------------------------
  always_comb begin
    out_valid       = valid_d;
    out_hdr         = hdr_d;
    out_is_sensor   = sensor_d;
    out_drop        = valid_d && sensor_d && !c_pass;
    out_port        = sensor_d ? CTRL_PORT : l2_port_d;
    out_has_rule    = c_has_rule;
    out_rule_true   = c_rule_true;
    out_avg         = sensor_d ? avg_d : '0;
    out_clause_true = sensor_d ? c_clause_true : '0;
    for (int k = 0; k < HIST_DEPTH; k++)
      out_history[k] = sensor_d ? value_t'(hw_d[k*VALUE_W +: VALUE_W]) : '0;
  end

  // ---------------- pipeline rules ------------------------------------------
  // every packet leaves exactly LAT cycles after it entered; only sensor
  // packets are ever dropped
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
                              out_valid == $past(in_valid, LAT));
  a_drop_sensor_only: assert property (@(posedge clk) disable iff (!rst_n)
                                       out_drop |-> (out_valid && out_is_sensor));

endmodule
