// nr_l2_fwd: L2 forwarding of the traffic that is not sensor data. The
// destination MAC address is matched exactly against a table of DEPTH
// entries (all compared in parallel); a hit gives the egress port, a miss
// sends the packet to MISS_PORT.
//
// The document names L2 forwarding only as an example of what is done with
// other traffic; table size, miss handling and timing are this design's own.
// Interface: wr_* writes entry wr_index; lk_mac at cycle t gives
// out_hit/out_port at t+1. Should two entries hold the same MAC, the lowest
// index wins.
module nr_l2_fwd
  import nr_pkg::*;
#(
  parameter int unsigned DEPTH     = 64,
  parameter port_t       MISS_PORT = 9'd511
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [7:0]  wr_index,
  input  logic        wr_valid,
  input  logic [47:0] wr_mac,
  input  port_t       wr_port,
  input  logic [47:0] lk_mac,
  output logic        out_hit,
  output port_t       out_port
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [IDX_W-1:0] wr_idx;
  assign wr_idx = IDX_W'(wr_index);

  logic [47:0]      mac  [DEPTH];
  port_t            port [DEPTH];
  logic [DEPTH-1:0] vld;

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_index) < DEPTH)) begin
      mac[wr_idx]  <= wr_mac;
      port[wr_idx] <= wr_port;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (wr_en && (32'(wr_index) < DEPTH)) vld[wr_idx] <= wr_valid;
  end

  logic  hit_c;
  port_t port_c;
  always_comb begin
    hit_c  = 1'b0;
    port_c = MISS_PORT;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (vld[i] && mac[i] == lk_mac) begin
        hit_c  = 1'b1;
        port_c = port[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_hit  <= 1'b0;
      out_port <= MISS_PORT;
    end else begin
      out_hit  <= hit_c;
      out_port <= port_c;
    end
  end

  // the control plane must write existing slots only
  a_wr_index: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (32'(wr_index) < DEPTH));

endmodule
