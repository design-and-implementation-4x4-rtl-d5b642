// ip_slave_tb: writes random bytes to all eight locations, reads them back
// in random order, and checks read_return timing (READ_LATENCY cycles after
// the request), not_ready while the read is pending, and led_output.
module ip_slave_tb;
  localparam int LAT = 3;
  logic clk = 0, nreset = 0;
  logic [31:0] address;
  logic write_enable, read_request, not_ready, read_return;
  logic [7:0] write_data, read_data, led_output;
  logic [7:0] model [8];
  int checks = 0, failures = 0;

  ip_slave #(.MEM_DEPTH(8), .READ_LATENCY(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", msg, $time); end
  endtask

  initial begin
    address = '0; write_enable = 0; read_request = 0; write_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); nreset = 1;
    for (int i = 0; i < 8; i++) model[i] = '0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      address = {$urandom} & 32'hFFFF_FFF8 | 32'($urandom % 8);
      if ($urandom % 2) begin
        write_data = 8'($urandom);
        write_enable = 1;
        @(negedge clk);
        write_enable = 0;
        model[address[2:0]] = write_data;
        check(led_output == write_data, "led_output");
      end else begin
        int lat;
        lat = 0;
        read_request = 1;
        @(negedge clk);
        read_request = 0;
        check(not_ready, "not_ready after request");
        while (!read_return && lat < 20) begin
          lat++;
          @(negedge clk);
        end
        check(lat == LAT - 1, $sformatf("read latency %0d", lat));
        check(read_data == model[address[2:0]], "read data");
        check(!not_ready, "ready after return");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
