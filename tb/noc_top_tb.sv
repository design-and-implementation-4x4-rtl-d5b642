// noc_top_tb: end-to-end run of the 4x4 mesh under heavy load. All four
// masters write to and read back from slave 15, each at its own address
// with its own byte, so their packets meet in the routers of row 3 and
// column 3; the slave's memory answers after eight cycles, more than it can
// serve in a 32-cycle loop, and the buffers are two deep. Every read return that reaches a master must carry that
// master's byte (the write always goes ahead of the read on the same path),
// and at the end the slave's memory and the LEDs must hold the four bytes.
// The run must show each mechanism of the design at least once: writes,
// read requests, read returns, arbitration conflicts in a router, a full
// input buffer raising busy, a slave that is not ready, and a master's
// adaptor holding a request back.
module noc_top_tb;
  import noc_pkg::*;
  localparam logic [3:0][3:0]  TGT  = {4'd15, 4'd15, 4'd15, 4'd15};
  localparam logic [3:0][27:0] ADR  = {28'h3, 28'h2, 28'h1, 28'h0};
  localparam logic [3:0][7:0]  DAT  = {8'h4D, 8'h3C, 8'h2B, 8'h1A};
  logic clk = 0, nreset = 0;
  logic [3:0][7:0] test_leds, led_output;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_ret = 0, n_conflict = 0, n_busy = 0,
      n_notready = 0, n_na_hold = 0;

  noc_top #(.M_TARGET(TGT), .M_ADDR(ADR), .M_DATA(DAT), .READ_LATENCY(8),
            .IN_DEPTH(2), .OUT_DEPTH(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", msg, $time); end
  endtask

  // master side probes
  logic       m_ret  [4];
  logic [7:0] m_data [4];
  logic       m_nr   [4];
  logic       m_rb   [4];
  for (genvar m = 0; m < 4; m++) begin : g_m
    assign m_ret[m]  = dut.g_row[0].g_col[m].g_master.u_node.read_return;
    assign m_data[m] = dut.g_row[0].g_col[m].g_master.u_node.read_data;
    assign m_nr[m]   = dut.g_row[0].g_col[m].g_master.u_node.not_ready;
    assign m_rb[m]   = dut.g_row[0].g_col[m].g_master.u_node.router_busy;
  end

  // arbitration conflicts and full input buffers in every router
  logic conflict [16];
  logic busy     [16];
  for (genvar r = 0; r < 4; r++) begin : g_r
    for (genvar c = 0; c < 4; c++) begin : g_c
      localparam int ID = 4 * r + c;
      if (r == 0) begin : g_p
        assign conflict[ID] = |{$countones(dut.g_row[r].g_col[c].g_master.u_node.u_router.req[0]) > 1,
                                $countones(dut.g_row[r].g_col[c].g_master.u_node.u_router.req[1]) > 1,
                                $countones(dut.g_row[r].g_col[c].g_master.u_node.u_router.req[2]) > 1,
                                $countones(dut.g_row[r].g_col[c].g_master.u_node.u_router.req[3]) > 1,
                                $countones(dut.g_row[r].g_col[c].g_master.u_node.u_router.req[4]) > 1};
        assign busy[ID] = dut.g_row[r].g_col[c].g_master.u_node.u_router.local_busy_out;
      end else if (ID == 4 || ID == 7 || ID == 12 || ID == 15) begin : g_p
        assign conflict[ID] = |{$countones(dut.g_row[r].g_col[c].g_slave.u_node.u_router.req[0]) > 1,
                                $countones(dut.g_row[r].g_col[c].g_slave.u_node.u_router.req[1]) > 1,
                                $countones(dut.g_row[r].g_col[c].g_slave.u_node.u_router.req[2]) > 1,
                                $countones(dut.g_row[r].g_col[c].g_slave.u_node.u_router.req[3]) > 1,
                                $countones(dut.g_row[r].g_col[c].g_slave.u_node.u_router.req[4]) > 1};
        assign busy[ID] = |{dut.bsy_out[ID][1], dut.bsy_out[ID][2], dut.bsy_out[ID][3], dut.bsy_out[ID][4]};
      end else begin : g_p
        assign conflict[ID] = |{$countones(dut.g_row[r].g_col[c].g_router.u_node.req[0]) > 1,
                                $countones(dut.g_row[r].g_col[c].g_router.u_node.req[1]) > 1,
                                $countones(dut.g_row[r].g_col[c].g_router.u_node.req[2]) > 1,
                                $countones(dut.g_row[r].g_col[c].g_router.u_node.req[3]) > 1,
                                $countones(dut.g_row[r].g_col[c].g_router.u_node.req[4]) > 1};
        assign busy[ID] = |{dut.bsy_out[ID][1], dut.bsy_out[ID][2], dut.bsy_out[ID][3], dut.bsy_out[ID][4]};
      end
    end
  end

  always @(posedge clk) if (nreset) begin
    if (dut.g_row[3].g_col[3].g_slave.u_node.write_enable) n_wr++;
    if (dut.g_row[3].g_col[3].g_slave.u_node.read_request) n_rd++;
    if (dut.g_row[3].g_col[3].g_slave.u_node.not_ready)    n_notready++;
    for (int m = 0; m < 4; m++) begin
      if (m_ret[m]) begin
        n_ret++;
        check(m_data[m] == DAT[m], $sformatf("master %0d got %h exp %h", m, m_data[m], DAT[m]));
      end
      if (m_nr[m] && m_rb[m]) n_na_hold++;
    end
    for (int i = 0; i < 16; i++) begin
      if (conflict[i]) n_conflict++;
      if (busy[i]) n_busy++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); nreset = 1;
    repeat (32 * 20) @(negedge clk);
    for (int m = 0; m < 4; m++) begin
      check(test_leds[m] == DAT[m], $sformatf("test_leds[%0d] = %h", m, test_leds[m]));
      check(dut.g_row[3].g_col[3].g_slave.u_node.u_ip.register_array[m] == DAT[m],
            $sformatf("slave 15 location %0d", m));
    end
    check(led_output[0] == 8'h00 && led_output[1] == 8'h00 && led_output[2] == 8'h00,
          "other slaves untouched");
    $display("noc_top_tb: writes %0d reads %0d returns %0d conflicts %0d busy %0d not_ready %0d na_hold %0d",
             n_wr, n_rd, n_ret, n_conflict, n_busy, n_notready, n_na_hold);
    check(n_wr > 0, "writes happened");
    check(n_rd > 0, "read requests happened");
    check(n_ret > 0, "read returns happened");
    check(n_conflict > 0, "arbitration conflicts happened");
    check(n_busy > 0, "buffer-full busy happened");
    check(n_notready > 0, "slave not-ready stalls happened");
    check(n_na_hold > 0, "adaptor hold happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
