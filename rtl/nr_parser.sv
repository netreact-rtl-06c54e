// nr_parser: first step of the NETREACT pipeline. It decides whether an
// incoming packet is a sensor packet or other traffic.
//
// A sensor packet is an IPv4/UDP packet to the sensor UDP port; it carries one
// sensor ID and one sensor value (the FastReact sensor data format). Every
// other packet is "other traffic" and goes to L2 forwarding. The split into
// sensor / other traffic is the document's; matching on EtherType, IP protocol
// and a UDP destination port is this design's own choice.
//
// Interface: in_valid/in_hdr carry the parsed header fields of one packet per
// cycle. Timing: one register stage, out_* follow in_* by one cycle; no stall.
module nr_parser
  import nr_pkg::*;
#(
  parameter logic [15:0] SENSOR_UDP_PORT = 16'd50000
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  pkt_hdr_t in_hdr,
  output logic     out_valid,
  output logic     out_is_sensor,
  output pkt_hdr_t out_hdr
);

  logic is_sensor;
  always_comb
    is_sensor = (in_hdr.ether_type == ETH_IPV4) && (in_hdr.ip_proto == IP_UDP) &&
                (in_hdr.udp_dport == SENSOR_UDP_PORT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_is_sensor <= 1'b0;
      out_hdr       <= '0;
    end else begin
      out_valid     <= in_valid;
      out_is_sensor <= in_valid && is_sensor;
      out_hdr       <= in_hdr;
    end
  end

endmodule
