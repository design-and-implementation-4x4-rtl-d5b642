// na_slave_tb: delivers write and read-request packets to the adaptor and
// plays the IP slave. Checks the address, data and strobes on the slave
// side, that not_ready delays the strobes, that busy_out is high while a
// packet is being handled, and the read-return packet (route back to the
// source contact, type bits, objective, data in [35:28]) including a hold by
// a busy router.
module na_slave_tb;
  import noc_pkg::*;
  localparam logic [3:0] ME = 4'd12;   // row 3, column 0
  logic clk = 0, nreset = 0;
  logic [31:0] address;
  logic write_enable, read_request, not_ready, read_return, busy_out, busy_in;
  logic [7:0] write_data, read_data;
  pkt_t pkt_in, pkt_out;
  int checks = 0, failures = 0;

  na_slave #(.NODE_ID(ME)) dut (.*);

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

  function automatic logic [5:0] route_bits(int src);
    int dy = src / 4 - 3, dx = src % 4;
    logic yd = dy < 0, xd = dx < 0;
    int ay = dy < 0 ? -dy : dy, ax = dx < 0 ? -dx : dx;
    return {yd, 2'(ay), xd, 2'(ax)};
  endfunction

  initial begin
    not_ready = 0; read_return = 0; read_data = '0; busy_in = 0; pkt_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); nreset = 1;
    for (int n = 0; n < 300; n++) begin
      automatic logic [27:0] la = 28'($urandom);
      automatic logic [7:0] d = 8'($urandom);
      automatic int src = $urandom % 16;
      automatic int stall = $urandom % 3;
      int guard;
      check(!busy_out, "idle: not busy");
      pkt_in = '0;
      pkt_in.obj = ME;
      if ($urandom % 2) begin
        pkt_in.wr = 1'b1; pkt_in.body = {la, d};
        @(negedge clk);
        pkt_in = '0;
        not_ready = stall != 0;
        #1;
        for (int s = 0; s < stall; s++) begin
          check(busy_out && !write_enable, "write held by not_ready");
          @(negedge clk);
          if (s == stall - 1) not_ready = 0;
          #1;
        end
        check(write_enable && address == {4'h0, la} && write_data == d, "write strobe");
        check(!read_request, "no read strobe");
        @(negedge clk);
        check(!write_enable, "single write strobe");
      end else begin
        logic [48:0] exp;
        pkt_in.rd = 1'b1; pkt_in.body = {la, 4'(src), 4'h0};
        @(negedge clk);
        pkt_in = '0;
        not_ready = stall != 0;
        #1;
        for (int s = 0; s < stall; s++) begin
          check(busy_out && !read_request, "read held by not_ready");
          @(negedge clk);
          if (s == stall - 1) not_ready = 0;
          #1;
        end
        check(read_request && address == {4'h0, la}, "read strobe");
        @(negedge clk);
        check(!read_request, "single read strobe");
        repeat ($urandom % 3) @(negedge clk);
        read_return = 1; read_data = d;
        busy_in = ($urandom % 2);
        @(negedge clk);
        read_return = 0; read_data = 8'h00;
        exp = {route_bits(src), 3'b001, 4'(src), d, 28'h0};
        guard = 0;
        while (busy_in && guard < 3) begin
          check(pkt_out == '0 && busy_out, "return held by busy router");
          @(negedge clk);
          guard++;
          if (guard == 2) busy_in = 0;
          #1;
        end
        check(pkt_out == exp, $sformatf("return packet %h exp %h", pkt_out, exp));
        @(negedge clk);
        check(pkt_out == '0, "return sent once");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
