// route_unit_tb: every combination of the six route bits, with random
// payloads, against an independent Y-then-X model.
module route_unit_tb;
  import noc_pkg::*;
  pkt_t pkt_in, pkt_out, exp_pkt;
  logic [NPORTS-1:0] out_port;
  int exp_port;
  int checks = 0, failures = 0;

  route_unit dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 64; h++) begin
      pkt_in = pkt_t'({h[5:0], 43'({$urandom, $urandom})});
      #1;
      exp_pkt = pkt_in;
      if (h[4:3] != 0) begin
        exp_port = h[5] ? 1 : 3;
        exp_pkt.ycnt = 2'(h[4:3] - 1);
      end else if (h[1:0] != 0) begin
        exp_port = h[2] ? 4 : 2;
        exp_pkt.xcnt = 2'(h[1:0] - 1);
      end else exp_port = 0;
      checks++;
      if (out_port != NPORTS'(1) << exp_port || pkt_out != exp_pkt) begin
        failures++;
        $display("FAIL h=%b port=%b exp=%0d", h[5:0], out_port, exp_port);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
