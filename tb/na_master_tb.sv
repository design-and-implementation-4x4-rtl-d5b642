// na_master_tb: for random targets checks the write and read-request
// packets bit by bit (route, type bits, objective, local contact, data or
// source contact) against values assembled here from the bit map, checks
// that a busy router holds the packet and keeps not_ready high, and that a
// read-return packet produces read_return with the data of bits [35:28].
// A second adaptor at node 3 checks the exact read request of master 3 to
// address 3 of slave 7, 0447000000330.
module na_master_tb;
  import noc_pkg::*;
  localparam logic [3:0] ME = 4'd6;   // row 1, column 2
  logic clk = 0, nreset = 0;
  logic [31:0] address;
  logic write_enable, read_request, read_return, not_ready, busy_in;
  logic [7:0] write_data, read_data;
  pkt_t pkt_out, pkt_in;
  int checks = 0, failures = 0;

  na_master #(.NODE_ID(ME)) dut (.*);

  // a second adaptor at node 3 for the master 3 -> slave 7 read request
  pkt_t pkt_out3;
  logic nr3, rr3;
  logic [7:0] rd3;
  na_master #(.NODE_ID(4'd3)) dut3 (
    .clk, .nreset, .address(32'h7000_0003), .write_enable(1'b0),
    .write_data(8'h00), .read_request, .read_return(rr3), .read_data(rd3),
    .not_ready(nr3), .pkt_out(pkt_out3), .busy_in(1'b0), .pkt_in('0));
  always @(posedge clk) if (nreset && pkt_valid(pkt_out3)) begin
    checks++;
    if (pkt_out3 != 49'h0447000000330) begin
      failures++;
      $display("FAIL node 3 read request %h", pkt_out3);
    end
  end

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

  function automatic logic [5:0] route_bits(int dst);
    int dy = dst / 4 - 1, dx = dst % 4 - 2;
    logic yd = dy < 0, xd = dx < 0;
    int ay = dy < 0 ? -dy : dy, ax = dx < 0 ? -dx : dx;
    return {yd, 2'(ay), xd, 2'(ax)};
  endfunction

  initial begin
    address = '0; write_enable = 0; read_request = 0; write_data = '0;
    busy_in = 0; pkt_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); nreset = 1;
    for (int n = 0; n < 300; n++) begin
      automatic int dst = $urandom % 16;
      automatic logic is_wr = $urandom % 2;
      logic [48:0] exp;
      automatic int hold = $urandom % 3;
      address = {4'(dst), 28'($urandom)};
      write_data = 8'($urandom);
      if (is_wr) exp = {route_bits(dst), 3'b010, 4'(dst), address[27:0], write_data};
      else       exp = {route_bits(dst), 3'b100, 4'(dst), address[27:0], ME, 4'h0};
      check(!not_ready, "ready before request");
      write_enable = is_wr; read_request = !is_wr;
      busy_in = hold != 0;
      @(negedge clk);
      write_enable = 0; read_request = 0;
      for (int h = 0; h < hold; h++) begin
        check(not_ready, "not_ready while held");
        check(pkt_out == '0, "nothing sent while router busy");
        @(negedge clk);
        if (h == hold - 1) busy_in = 0;
        #1;
      end
      check(pkt_out == exp, $sformatf("packet %h exp %h", pkt_out, exp));
      @(negedge clk);
      check(pkt_out == '0, "packet sent once");
      // a read return coming back
      if ($urandom % 2) begin
        automatic logic [7:0] d = 8'($urandom);
        pkt_in = '0; pkt_in.rr = 1'b1; pkt_in.obj = ME; pkt_in.body = {d, 28'h0};
        @(negedge clk);
        pkt_in = '0;
        check(read_return && read_data == d, "read return");
        @(negedge clk);
        check(!read_return && read_data == d, "read return pulse, data held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
