// crossbar_tb: random permutation-style grant patterns (each output at most
// one input, each input at most one output) and checks every output's data
// and valid flag.
module crossbar_tb;
  import noc_pkg::*;
  localparam int N = NPORTS;
  pkt_t in_pkt [N];
  logic [N-1:0] gnt [N];
  pkt_t out_pkt [N];
  logic [N-1:0] out_valid;
  int checks = 0, failures = 0;
  int src [N];

  crossbar #(.N(N)) dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      automatic logic [N-1:0] used = '0;
      for (int i = 0; i < N; i++) in_pkt[i] = pkt_t'({$urandom, $urandom});
      for (int o = 0; o < N; o++) begin
        automatic int i = $urandom % N;
        gnt[o] = '0;
        src[o] = -1;
        if (($urandom % 4) != 0 && !used[i]) begin
          used[i] = 1'b1; gnt[o][i] = 1'b1; src[o] = i;
        end
      end
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (out_valid[o] != (src[o] >= 0) ||
            (src[o] >= 0 && out_pkt[o] != in_pkt[src[o]])) begin
          failures++;
          $display("FAIL n=%0d out=%0d src=%0d", n, o, src[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
