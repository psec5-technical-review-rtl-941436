// spi_pico: input shift register and addressing logic of the SPI block.
//
// Bytes arrive MSB first on serial_in and are sampled on the rising edge of
// sclk. The first byte of a transaction is the address byte; every later
// byte is a data byte, and the address advances by one after each of them,
// so a transaction reads or writes consecutive registers. During the last
// bit of a byte (byte_last) the complete byte is visible on write_data,
// so a register can be written at that same sclk edge even if the host
// stops the clock right after it.
//
// A transaction ends when sclk stays quiet: a second clock domain (iclk,
// the ~40 MHz internal clock) watches an sclk toggle flag through a
// two-flop synchroniser, and after IDLE_ICLK iclk cycles in which it saw
// no sclk edge drops sclk_stop_rstn for one iclk cycle. Counting the
// synchroniser, the pulse ends IDLE_ICLK + 4 iclk cycles after the last
// sclk edge; the host must wait that long before the next address. The
// toggle flag needs sclk below twice the iclk rate (40-50 MHz against
// ~39 MHz here). That internal reset clears the byte counter and address, so
// the next byte is taken as a new address. External rstn resets everything.
//
// The two clock domains, the 7-cycle idle rule and the port names follow
// the document. The bit order, the sampling edge and the pulse width of
// the internal reset are this design's choices.
module spi_pico
  import psec5_pkg::*;
#(
  parameter int unsigned IDLE_ICLK = 7
) (
  input  logic       iclk,
  input  logic       rstn,               // external reset, active low
  input  logic       sclk,
  input  logic       serial_in,
  output logic       msg_flag,           // address byte received
  output logic [7:0] mux_control_signal, // current address byte
  output logic       sclk_stop_rstn,     // internal reset pulse, active low
  output logic [7:0] write_data,         // byte being completed
  output logic       byte_last,          // sclk cycle that ends a byte
  output logic       byte_start          // first bit period of a data byte
);
  timeunit 1ps; timeprecision 1ps;


  // ---------------- sclk domain ----------------
  logic       rst_n_int;
  logic [2:0] bit_cnt;
  logic [6:0] shift_q;
  logic [7:0] addr_q;
  logic       have_addr_q;
  logic       sclk_tgl_q;

  assign rst_n_int = rstn & sclk_stop_rstn;

  always_ff @(posedge sclk or negedge rst_n_int) begin
    if (!rst_n_int) begin
      bit_cnt     <= '0;
      shift_q     <= '0;
      addr_q      <= '0;
      have_addr_q <= 1'b0;
    end else begin
      shift_q <= {shift_q[5:0], serial_in};
      bit_cnt <= bit_cnt + 3'd1;
      if (bit_cnt == 3'd7) begin
        if (!have_addr_q) begin
          addr_q      <= {shift_q, serial_in};
          have_addr_q <= 1'b1;
        end else begin
          // keep the write flag, advance the 7-bit register address
          addr_q[6:0] <= addr_q[6:0] + 7'd1;
        end
      end
    end
  end

  // The toggle flag is reset only externally so that the idle detector
  // does not see its own reset as sclk activity.
  always_ff @(posedge sclk or negedge rstn) begin
    if (!rstn) sclk_tgl_q <= 1'b0;
    else       sclk_tgl_q <= ~sclk_tgl_q;
  end

  assign write_data         = {shift_q, serial_in};
  assign byte_last          = (bit_cnt == 3'd7);
  assign byte_start         = have_addr_q && (bit_cnt == 3'd0);
  assign msg_flag           = have_addr_q;
  assign mux_control_signal = addr_q;

  // ---------------- iclk domain: sclk pause detector ----------------
  localparam int unsigned CW = $clog2(IDLE_ICLK + 1);
  logic [1:0]    tgl_sync_q;
  logic          tgl_prev_q;
  logic [CW-1:0] idle_cnt_q;
  logic          stop_pulse_q;
  logic          activity;

  assign activity = tgl_sync_q[1] ^ tgl_prev_q;

  always_ff @(posedge iclk or negedge rstn) begin
    if (!rstn) begin
      tgl_sync_q   <= '0;
      tgl_prev_q   <= 1'b0;
      idle_cnt_q   <= CW'(IDLE_ICLK);   // idle after reset: no pulse
      stop_pulse_q <= 1'b0;
    end else begin
      tgl_sync_q <= {tgl_sync_q[0], sclk_tgl_q};
      tgl_prev_q <= tgl_sync_q[1];
      if (activity)
        idle_cnt_q <= '0;
      else if (idle_cnt_q != CW'(IDLE_ICLK))
        idle_cnt_q <= idle_cnt_q + 1'b1;
      stop_pulse_q <= !activity && (idle_cnt_q == CW'(IDLE_ICLK - 1));
    end
  end

  assign sclk_stop_rstn = ~stop_pulse_q;

endmodule
