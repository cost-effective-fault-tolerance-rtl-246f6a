// ni_msg_tracker -- lost, late and duplicate packet detection for multipacket messages.
//
// Packets of one message may take different paths and arrive out of order, so
// the network interface keeps a reordering record per message.  A message is
// opened (open, with its tag and packet count) when the sender and receiver set
// it up; up to NMSG = 16 may be active at once, each of at most MAXPK = 64
// packets.  For every active message the tracker keeps an arrival bitmap and a
// watchdog counter:
//   - an arrival sets its bit; the message completes (done, slot freed) when
//     every packet is in;
//   - an arrival whose bit is already set is an extra copy (err_dup);
//   - an arrival for a message that is not open, or with a sequence number
//     beyond the message length, is an extra packet (err_extra);
//   - a message still incomplete when its watchdog reaches the limit register
//     (one 16-bit register for all slots) raises err_late once.  The slot stays
//     open, so packets delivered by the drain that follows still fill their
//     holes; the processing node closes it (close) once it has decided.
// Reports are one per cycle: a same-cycle arrival error takes priority over a
// watchdog report, which waits (pending) for a free cycle.
//
// Timing: all outputs registered, one cycle after the event.
// Follows the document: 16 watchdog counters of 16 bits and a 16-bit register,
// detection of holes, duplicates and extra packets.  Own choices: the open/close
// interface, the report priority, the reset limit.
module ni_msg_tracker #(
  parameter int NMSG   = 16,
  parameter int MAXPK  = 64,
  parameter int WD_W   = 16,
  parameter int WD_RST = 65535,
  localparam int TW    = $clog2(NMSG),
  localparam int SW    = $clog2(MAXPK)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            open,
  input  logic [TW-1:0]   open_tag,
  input  logic [SW:0]     open_npk,
  input  logic            close,
  input  logic [TW-1:0]   close_tag,
  input  logic            wd_wr,
  input  logic [WD_W-1:0] wd_wdata,
  input  logic            pkt_v,
  input  logic [TW-1:0]   pkt_tag,
  input  logic [SW-1:0]   pkt_seq,
  output logic            done,
  output logic [TW-1:0]   done_tag,
  output logic            err_dup,
  output logic            err_extra,
  output logic            err_late,
  output logic [TW-1:0]   err_tag,
  output logic [NMSG-1:0] busy
);

  logic [MAXPK-1:0] bmap_q [NMSG];
  logic [SW:0]      npk_q  [NMSG];
  logic [SW:0]      rcv_q  [NMSG];
  logic [WD_W-1:0]  wd_q   [NMSG];
  logic [NMSG-1:0]  pend_q;
  logic [WD_W-1:0]  limit_q;

  logic             arr_err;
  logic             late_sel_v;
  logic [TW-1:0]    late_sel;

  always_comb begin
    arr_err = pkt_v && (!busy[pkt_tag] || ({1'b0, pkt_seq} >= npk_q[pkt_tag]) ||
                        bmap_q[pkt_tag][pkt_seq]);
    late_sel_v = 1'b0;
    late_sel   = '0;
    for (int i = NMSG - 1; i >= 0; i--) begin
      if (pend_q[i]) begin
        late_sel_v = 1'b1;
        late_sel   = TW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) limit_q <= WD_W'(WD_RST);
    else if (wd_wr) limit_q <= wd_wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= '0;
      pend_q    <= '0;
      done      <= 1'b0;
      done_tag  <= '0;
      err_dup   <= 1'b0;
      err_extra <= 1'b0;
      err_late  <= 1'b0;
      err_tag   <= '0;
      for (int i = 0; i < NMSG; i++) begin
        bmap_q[i] <= '0;
        npk_q[i]  <= '0;
        rcv_q[i]  <= '0;
        wd_q[i]   <= '0;
      end
    end else begin
      done      <= 1'b0;
      err_dup   <= 1'b0;
      err_extra <= 1'b0;
      err_late  <= 1'b0;

      // watchdogs
      for (int i = 0; i < NMSG; i++) begin
        if (busy[i] && wd_q[i] != limit_q) begin
          wd_q[i] <= wd_q[i] + WD_W'(1);
          if (wd_q[i] + WD_W'(1) == limit_q) pend_q[i] <= 1'b1;
        end
      end

      // arrivals
      if (pkt_v) begin
        if (arr_err) begin
          err_tag <= pkt_tag;
          if (busy[pkt_tag] && {1'b0, pkt_seq} < npk_q[pkt_tag]) err_dup <= 1'b1;
          else                                                 err_extra <= 1'b1;
        end else begin
          bmap_q[pkt_tag][pkt_seq] <= 1'b1;
          rcv_q[pkt_tag] <= rcv_q[pkt_tag] + 1'b1;
          if (rcv_q[pkt_tag] + 1'b1 == npk_q[pkt_tag]) begin
            busy[pkt_tag]   <= 1'b0;
            pend_q[pkt_tag] <= 1'b0;
            done     <= 1'b1;
            done_tag <= pkt_tag;
          end
        end
      end

      // watchdog report when no arrival error claims the error outputs
      if (!arr_err && late_sel_v) begin
        err_late         <= 1'b1;
        err_tag          <= late_sel;
        pend_q[late_sel] <= 1'b0;
      end

      if (close) begin
        busy[close_tag]   <= 1'b0;
        pend_q[close_tag] <= 1'b0;
      end
      if (open) begin
        busy[open_tag]   <= 1'b1;
        pend_q[open_tag] <= 1'b0;
        npk_q[open_tag]  <= open_npk;
        rcv_q[open_tag]  <= '0;
        wd_q[open_tag]   <= '0;
        bmap_q[open_tag] <= '0;
      end
    end
  end

endmodule
