// ip_master_tb: checks that the core writes WR_DATA to {TARGET_ID,LOCAL_ADDR}
// at the start of every 32-cycle loop and reads the same address five cycles
// later, that a busy adaptor (not_ready) delays but does not lose a request,
// and that a read return is latched onto test_leds.
module ip_master_tb;
  logic clk = 0, nreset = 0;
  logic [31:0] dest_addr;
  logic wr, read_request, read_return, not_ready;
  logic [7:0] wr_data, rd_data, test_leds;
  int checks = 0, failures = 0;
  int cyc = 0;
  int wr_cyc[$], rd_cyc[$];

  ip_master #(.TARGET_ID(4'h9), .LOCAL_ADDR(28'h123), .WR_DATA(8'h5A)) dut (.*);

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

  always @(posedge clk) if (nreset) begin
    cyc <= cyc + 1;
    if (wr) begin
      wr_cyc.push_back(cyc);
      check(dest_addr == 32'h9000_0123 && wr_data == 8'h5A, "write fields");
    end
    if (read_request) begin
      rd_cyc.push_back(cyc);
      check(dest_addr == 32'h9000_0123, "read address");
    end
    check(!(wr && read_request), "one strobe at a time");
  end

  initial begin
    not_ready = 0; read_return = 0; rd_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); nreset = 1;
    repeat (32 * 3) @(negedge clk);
    // return some data
    rd_data = 8'hC3; read_return = 1;
    @(negedge clk); read_return = 0; rd_data = 8'h00;
    @(negedge clk);
    check(test_leds == 8'hC3, "test_leds latches read data");
    // hold not_ready across the next write slot
    while (dut.cnt != 5'd31) @(negedge clk);
    not_ready = 1;
    repeat (4) @(negedge clk);
    not_ready = 0;
    repeat (40) @(negedge clk);
    check(wr_cyc.size() == 6 && rd_cyc.size() == 6, "request counts");
    for (int i = 0; i < 4; i++) begin
      check(wr_cyc[i] == 32 * i, $sformatf("write %0d at cycle %0d", i, wr_cyc[i]));
      check(rd_cyc[i] == 32 * i + 5, $sformatf("read %0d at cycle %0d", i, rd_cyc[i]));
    end
    check(wr_cyc[4] == 32 * 4 + 3, "delayed write");
    check(rd_cyc[4] == 32 * 4 + 5, "read after delayed write");
    check(wr_cyc[5] == 32 * 5, "next loop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
