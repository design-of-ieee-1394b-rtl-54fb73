// cycle_timer: IEEE 1394 cycle timer and cycle monitor.
//
// The cycle timer is the 32-bit CYCLE_TIME value {second_count[6:0],
// cycle_count[12:0], cycle_offset[11:0]}. cycle_offset counts a 24.576 MHz
// tick, derived here by dividing SCLK by OFFSET_DIV (2 for a 49.152 MHz
// SCLK); it wraps at 3072, giving one 125 us isochronous cycle, cycle_count
// wraps at 8000 (one second) and second_count at 128.
// The cycle monitor watches the cycle start packets reported by the receiver:
// each one loads the timer with the cycle master's value and pulses cyc_start,
// which opens the isochronous period for the isochronous transmitter. If no
// cycle start arrives within LOST_LIMIT SCLKs of the previous one, cyc_lost
// is pulsed once. The host may load the timer (load / load_value).
// The document names the block only; the field layout and rates are those of
// IEEE 1394, the lost-cycle limit (two cycles) is this design's choice. Acting
// as cycle master (sending cycle start packets) is not part of this block.
module cycle_timer #(
  parameter int OFFSET_DIV = 2,
  parameter int LOST_LIMIT = 12288
) (
  input  logic        sclk,
  input  logic        rst,
  input  logic        cyc_start_pkt,
  input  logic [31:0] cyc_time_in,
  input  logic        load,
  input  logic [31:0] load_value,
  output logic [31:0] cycle_time,
  output logic        cyc_start,
  output logic        cyc_lost
);
  localparam int DW = (OFFSET_DIV > 1) ? $clog2(OFFSET_DIV) : 1;
  logic [DW-1:0] div;
  logic [6:0]    sec;
  logic [12:0]   cnt;
  logic [11:0]   off;
  logic [15:0]   since;       // SCLKs since the last cycle start
  logic          lost_flag;
  logic          tick;

  assign tick       = (div == DW'(OFFSET_DIV - 1));
  assign cycle_time = {sec, cnt, off};

  always_ff @(posedge sclk) begin
    if (rst) begin
      div       <= '0;
      sec       <= '0;
      cnt       <= '0;
      off       <= '0;
      since     <= '0;
      lost_flag <= 1'b0;
      cyc_start <= 1'b0;
      cyc_lost  <= 1'b0;
    end else begin
      cyc_start <= 1'b0;
      cyc_lost  <= 1'b0;
      div <= tick ? '0 : div + 1'b1;
      if (cyc_start_pkt || load) begin
        {sec, cnt, off} <= cyc_start_pkt ? cyc_time_in : load_value;
      end else if (tick) begin
        if (off == 12'd3071) begin
          off <= '0;
          if (cnt == 13'd7999) begin
            cnt <= '0;
            sec <= sec + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end else begin
          off <= off + 1'b1;
        end
      end
      // cycle monitor
      if (cyc_start_pkt) begin
        since     <= '0;
        lost_flag <= 1'b0;
        cyc_start <= 1'b1;
      end else if (!lost_flag) begin
        if (since == 16'(LOST_LIMIT - 1)) begin
          lost_flag <= 1'b1;
          cyc_lost  <= 1'b1;
        end else begin
          since <= since + 1'b1;
        end
      end
    end
  end
endmodule
