// time_status: time register and enable/disable/reset status monitor.
//
// The time register is a TIME_W-bit counter that advances every clock and
// can be set from the board's time interface (time_load, time_in) so that
// all platforms share one time reference. Its value, now, stamps outgoing
// packets. The monitor holds the object's control word, written by the
// control port at REG_CTRL: bit 0 enables the object, bit 1 holds it in
// reset (and clears the sticky status flags). It watches the execution:
// every packet delivered to the object reports its origin time stamp on
// pkt_ts_valid/pkt_ts, and a packet older than the REG_MAXLAT bound is
// counted as late (REG_LATE). Overrun events of the FIFOs and interfaces
// are kept as sticky flags. In timed mode the window's stop time is also
// the object's processing deadline: if input is still waiting (obj_pending)
// when the window closes, the deadline is counted as missed (REG_MISSED).
// Registers are written with reg_we/reg_addr/
// reg_wdata and read combinationally on rdata:
//   REG_CTRL    {13'b0, timed, reset, enable}
//   REG_STATUS  {10'b0, deadline_missed, late_seen, itf_overrun, out_overrun, in_overrun,
//                obj_running}
//   REG_TIME_HI / REG_TIME_LO  the time register (reading HI freezes LO so
//                the two halves belong together)
//   REG_MAXLAT  maximum packet age in clocks (0 disables the check)
//   REG_LATE    number of late packets
//   REG_MISSED  number of windows that closed with input still waiting
//   REG_WSTART_HI/LO, REG_WSTOP_HI/LO  start and stop time of the run
//                window (TIME_W must stay 32 for this register layout)
// obj_enable is registered: it follows a write of the control word or the
// time reaching a window edge by one clock.
// Time stamps, a time register, enable/disable/reset of the object, running
// the object in given time intervals and a status monitor follow the
// document, as does the rule that objects finish before a deadline; the
// register layout, the window form, taking the window stop as the deadline,
// the age check and the counter widths are this design's choices.
module time_status
  import phal_pkg::*;
#(
  parameter int unsigned TIME_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // on-board time interface
  input  logic              time_load,
  input  logic [TIME_W-1:0] time_in,
  output logic [TIME_W-1:0] now,
  // register access
  input  logic              reg_we,
  input  logic [6:0]        reg_addr,
  input  logic [15:0]       reg_wdata,
  input  logic              reg_re,
  output logic [15:0]       rdata,
  // control word to the object
  output logic              obj_enable,
  output logic              obj_reset,
  // events watched
  input  logic              obj_running,
  input  logic              obj_pending,
  input  logic              in_overrun,
  input  logic              out_overrun,
  input  logic              itf_overrun,
  input  logic              pkt_ts_valid,
  input  logic [TIME_W-1:0] pkt_ts,
  output logic              late_pkt,
  output logic              deadline_miss
);
  logic [15:0]       max_lat, late_cnt, lo_hold, miss_cnt;
  logic              ctl_enable, ctl_timed, in_window, win_q;
  logic [TIME_W-1:0] win_start, win_stop;
  logic              st_in_ovr, st_out_ovr, st_itf_ovr, st_late, st_miss;
  logic [TIME_W-1:0] age;

  assign age       = now - pkt_ts;
  // now in [win_start, win_stop), measured from the start so it survives wrap-around
  assign in_window = (now - win_start) < (win_stop - win_start);
  assign late_pkt = pkt_ts_valid && (max_lat != 0) && (age > TIME_W'(max_lat));
  // the window has just closed on an enabled timed object that still has work
  assign deadline_miss = ctl_enable && ctl_timed && win_q && !in_window && obj_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now        <= '0;
      obj_enable <= 1'b0;
      ctl_enable <= 1'b0;
      ctl_timed  <= 1'b0;
      win_start  <= '0;
      win_stop   <= '0;
      obj_reset  <= 1'b0;
      max_lat    <= '0;
      late_cnt   <= '0;
      lo_hold    <= '0;
      st_in_ovr  <= 1'b0;
      st_out_ovr <= 1'b0;
      st_itf_ovr <= 1'b0;
      st_late    <= 1'b0;
      st_miss    <= 1'b0;
      miss_cnt   <= '0;
      win_q      <= 1'b0;
    end else begin
      now <= time_load ? time_in : now + 1'b1;
      obj_enable <= ctl_enable && (!ctl_timed || in_window);
      win_q      <= in_window;
      if (deadline_miss) begin
        st_miss  <= 1'b1;
        miss_cnt <= miss_cnt + 1'b1;
      end
      if (in_overrun)  st_in_ovr  <= 1'b1;
      if (out_overrun) st_out_ovr <= 1'b1;
      if (itf_overrun) st_itf_ovr <= 1'b1;
      if (late_pkt) begin
        st_late  <= 1'b1;
        late_cnt <= late_cnt + 1'b1;
      end
      if (reg_re && reg_addr == REG_TIME_HI) lo_hold <= now[15:0];
      if (reg_we) begin
        case (reg_addr)
          REG_CTRL: begin
            ctl_enable <= reg_wdata[CTRL_ENABLE];
            ctl_timed  <= reg_wdata[CTRL_TIMED];
            obj_reset  <= reg_wdata[CTRL_RESET];
            if (reg_wdata[CTRL_RESET]) begin
              st_in_ovr  <= 1'b0;
              st_out_ovr <= 1'b0;
              st_itf_ovr <= 1'b0;
              st_late    <= 1'b0;
              late_cnt   <= '0;
              st_miss    <= 1'b0;
              miss_cnt   <= '0;
            end
          end
          REG_MAXLAT:    max_lat <= reg_wdata;
          REG_WSTART_HI: win_start[31:16] <= reg_wdata;
          REG_WSTART_LO: win_start[15:0]  <= reg_wdata;
          REG_WSTOP_HI:  win_stop[31:16]  <= reg_wdata;
          REG_WSTOP_LO:  win_stop[15:0]   <= reg_wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (reg_addr)
      REG_CTRL:    rdata = {13'b0, ctl_timed, obj_reset, ctl_enable};
      REG_STATUS:  rdata = {10'b0, st_miss, st_late, st_itf_ovr, st_out_ovr, st_in_ovr, obj_running};
      REG_TIME_HI: rdata = 16'(now >> 16);
      REG_TIME_LO: rdata = lo_hold;
      REG_MAXLAT:  rdata = max_lat;
      REG_LATE:    rdata = late_cnt;
      REG_MISSED:  rdata = miss_cnt;
      REG_WSTART_HI: rdata = win_start[31:16];
      REG_WSTART_LO: rdata = win_start[15:0];
      REG_WSTOP_HI:  rdata = win_stop[31:16];
      REG_WSTOP_LO:  rdata = win_stop[15:0];
      default:     rdata = '0;
    endcase
  end

endmodule
