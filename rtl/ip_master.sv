// ip_master: the processor-core stand-in of a master node.
//
// A counter cnt runs from 0 to PERIOD-1 and wraps. At cnt = 0 the core
// issues a write of WR_DATA to address {TARGET_ID, LOCAL_ADDR}; at
// cnt = READ_AT it issues a read request to the same address, in the same
// cycle if the network adaptor's not_ready is low; otherwise the request is
// held pending and strobed for one cycle once not_ready falls (a write first
// if both are pending). A read return
// latches read_data into read_return_register and onto test_leds, so the
// LEDs show the value fetched back from the slave. The paper gives the
// 32-cycle loop; cnt = 5 for the read and the per-master targets and data are
// read from its waveforms; the pending-until-ready rule is this design's
// choice.
module ip_master #(
  parameter logic [3:0]  TARGET_ID  = 4'hF,
  parameter logic [27:0] LOCAL_ADDR = 28'h2,
  parameter logic [7:0]  WR_DATA    = 8'hAA,
  parameter int          PERIOD     = 32,
  parameter int          READ_AT    = 5
) (
  input  logic        clk,
  input  logic        nreset,
  output logic [31:0] dest_addr,
  output logic        wr,
  output logic [7:0]  wr_data,
  output logic        read_request,
  input  logic        read_return,
  input  logic [7:0]  rd_data,
  input  logic        not_ready,
  output logic [7:0]  test_leds
);
  localparam int CW = $clog2(PERIOD);

  logic [CW-1:0] cnt;
  logic          pend_wr, pend_rd;
  logic          want_wr, want_rd;
  logic [7:0]    read_return_register;

  assign dest_addr    = {TARGET_ID, LOCAL_ADDR};
  assign wr_data      = WR_DATA;
  assign want_wr      = (cnt == '0) || pend_wr;
  assign want_rd      = (cnt == CW'(READ_AT)) || pend_rd;
  assign wr           = want_wr && !not_ready;
  assign read_request = want_rd && !want_wr && !not_ready;
  assign test_leds    = read_return_register;

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      cnt                  <= '0;
      pend_wr              <= 1'b0;
      pend_rd              <= 1'b0;
      read_return_register <= '0;
    end else begin
      cnt <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      pend_wr <= want_wr && !wr;
      pend_rd <= want_rd && !read_request;
      if (read_return) read_return_register <= rd_data;
    end
  end

endmodule
