// tb_nr_parser: checks the sensor / other-traffic split of nr_parser against
// an independent rule (IPv4, UDP, destination port 50000) on random headers,
// a third of them sensor packets, and checks the one-cycle latency.
module tb_nr_parser;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid, out_is_sensor;
  pkt_hdr_t in_hdr = '0, out_hdr;
  nr_parser dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic     exp_s, exp_v;
  pkt_hdr_t exp_h;
  int n_sensor = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_hdr = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      case ($urandom_range(0, 5))
        0, 1: begin in_hdr.ether_type = 16'h0800; in_hdr.ip_proto = 17; in_hdr.udp_dport = 50000; end
        2: begin in_hdr.ether_type = 16'h0800; in_hdr.ip_proto = 6; in_hdr.udp_dport = 50000; end
        3: begin in_hdr.ether_type = 16'h86dd; in_hdr.ip_proto = 17; in_hdr.udp_dport = 50000; end
        4: begin in_hdr.ether_type = 16'h0800; in_hdr.ip_proto = 17; in_hdr.udp_dport = 50001; end
        default: ;
      endcase
      exp_v = in_valid;
      exp_h = in_hdr;
      exp_s = in_valid && in_hdr.ether_type == 16'h0800 && in_hdr.ip_proto == 8'd17 &&
              in_hdr.udp_dport == 16'd50000;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== exp_v || out_is_sensor !== exp_s || (exp_v && out_hdr !== exp_h)) begin
        failures++;
        if (failures < 10) $display("mismatch %0d: valid %b/%b sensor %b/%b", i, out_valid, exp_v, out_is_sensor, exp_s);
      end
      if (exp_s) n_sensor++;
    end
    checks++; if (n_sensor < 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
