// ip_slave: the storage device behind a slave node.
//
// A MEM_DEPTH-entry byte register array, cleared by reset. write_enable
// stores write_data at the address's low bits and also shows it on
// led_output. read_request captures the addressed byte; READ_LATENCY cycles
// later (at least one) read_return pulses for one cycle with the byte on
// read_data, which then holds. For READ_LATENCY above one, not_ready is high
// from the cycle after a read request until the read return, and requests
// are ignored meanwhile. The paper gives the
// function (store written data, return it on a read request) and its
// waveform shows an 8-entry array and a led_output; the latency parameter
// and not_ready's timing are this design's choices.
module ip_slave #(
  parameter int MEM_DEPTH    = 8,
  parameter int READ_LATENCY = 1
) (
  input  logic        clk,
  input  logic        nreset,
  input  logic [31:0] address,
  input  logic        write_enable,
  input  logic [7:0]  write_data,
  input  logic        read_request,
  output logic        not_ready,
  output logic        read_return,
  output logic [7:0]  read_data,
  output logic [7:0]  led_output
);
  localparam int AW = (MEM_DEPTH > 1) ? $clog2(MEM_DEPTH) : 1;
  localparam int LW = $clog2(READ_LATENCY + 1);

  logic [7:0]    register_array [MEM_DEPTH];
  logic [7:0]    rd_q;
  logic [LW-1:0] wait_cnt;
  logic          pending;
  logic [AW-1:0] idx;

  assign idx       = address[AW-1:0];
  assign not_ready = pending;

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      for (int i = 0; i < MEM_DEPTH; i++) register_array[i] <= '0;
      rd_q        <= '0;
      wait_cnt    <= '0;
      pending     <= 1'b0;
      read_return <= 1'b0;
      read_data   <= '0;
      led_output  <= '0;
    end else begin
      read_return <= 1'b0;
      if (write_enable && !pending) begin
        register_array[idx] <= write_data;
        led_output          <= write_data;
      end
      if (pending) begin
        if (wait_cnt == LW'(1)) begin
          pending     <= 1'b0;
          read_return <= 1'b1;
          read_data   <= rd_q;
        end else begin
          wait_cnt <= wait_cnt - 1'b1;
        end
      end else if (read_request) begin
        if (READ_LATENCY <= 1) begin
          read_return <= 1'b1;
          read_data   <= register_array[idx];
        end else begin
          rd_q     <= register_array[idx];
          wait_cnt <= LW'(READ_LATENCY - 1);
          pending  <= 1'b1;
        end
      end
    end
  end

endmodule
