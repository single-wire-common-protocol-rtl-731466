// frame_rx: slave side of a node - watches the wire, receives every frame and
// answers command frames addressed to it.
//
// The receiver hunts for a frame while the wire is idle (low). The first high
// slot starts a frame; from then on it shifts one wire bit per bit slot into
// its frame buffer and counts slots. After the 8 sync slots it checks the SOF
// pattern and drops a frame that does not carry it. After slot 28 (the R/W
// bit) the header is complete: if it is a command frame for this node's slave
// ID, the receiver drives the 64 response bits itself in slots 29..92,
// taking them from `resp_data` at that moment. When all 93 slots are in, a
// data frame for this node is handed out on `rx_valid`/`rx_frame`, any other
// frame is discarded. IFS_BITS idle slots follow before the next frame can
// start. Frames that carry this node's own priority number are its own master's
// and are neither delivered nor answered.
//
// From the protocol: sync-field search, filling the frame buffer, the slave
// ID match, the data/command split and the slave filling the data field of a
// command frame. This design's choices: a frame always lasts 93 slots, so
// "buffer full" ends it (an unanswered command reads as zeros); a bad SOF
// drops the frame; an own-MPN frame is ignored.
//
// Timing: everything moves on `bit_tick`. At a tick `rd` holds the level of
// the slot that is ending, and `wr` takes the level of the slot that begins.
// `bus_free` is combinational: high at a tick when no frame is running and the
// slot just ended was idle, which is when a master may start. rx_valid,
// cmd_served, not_for_me, sof_error and frame_done are one-clock pulses.
module frame_rx
  import swmm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      bit_tick,
  input  logic      rd,          // read line: level on the wire
  output logic      wr,          // write line: slave response bits
  input  sid_t      my_sid,
  input  mpn_t      my_mpn,
  input  data_t     resp_data,   // data held by the slave for a command
  output logic      bus_free,    // a master may start its frame now
  output logic      busy,        // a frame or inter-frame gap is in progress
  output slot_t     slot,        // slots of the current frame received so far
  output logic      rx_valid,    // data frame for this node received
  output rx_frame_t rx_frame,
  output logic      cmd_served,  // command for this node answered
  output mpn_t      cmd_mpn,     // who sent that command
  output logic      not_for_me,  // complete frame for another node discarded
  output logic      sof_error,   // frame dropped: sync field wrong
  output logic      frame_done   // a complete frame passed on the wire
);

  typedef enum logic [1:0] {S_IDLE, S_FRAME, S_GAP} state_t;

  localparam int GW = $clog2(IFS_BITS + 1);

  state_t                  state;
  logic [FRAME_BITS-2:0]   fbuf;       // first FRAME_BITS-1 received bits
  logic [FRAME_BITS-1:0]   full_frame; // fbuf plus the bit now on the wire
  header_t                 hdr_now;
  header_t                 hdr_full;
  logic                    responding;
  data_t                   resp_sh;
  logic [GW-1:0]           gap_cnt;

  assign full_frame = {fbuf, rd};
  assign hdr_now    = header_t'({fbuf[HDR_BITS-2:0], rd});              // valid at slot 28
  assign hdr_full   = header_t'(full_frame[FRAME_BITS-1 -: HDR_BITS]);  // valid at slot 92

  logic for_me_now, for_me_full;
  assign for_me_now  = (hdr_now.sid  == my_sid) && (hdr_now.mpn  != my_mpn);
  assign for_me_full = (hdr_full.sid == my_sid) && (hdr_full.mpn != my_mpn);

  assign busy     = (state != S_IDLE);
  assign bus_free = (state == S_IDLE) && !rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      fbuf       <= '0;
      slot       <= '0;
      wr         <= 1'b0;
      responding <= 1'b0;
      resp_sh    <= '0;
      gap_cnt    <= '0;
      rx_valid   <= 1'b0;
      rx_frame   <= '0;
      cmd_served <= 1'b0;
      cmd_mpn    <= '0;
      not_for_me <= 1'b0;
      sof_error  <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      rx_valid   <= 1'b0;
      cmd_served <= 1'b0;
      not_for_me <= 1'b0;
      sof_error  <= 1'b0;
      frame_done <= 1'b0;
      if (bit_tick) begin
        unique case (state)
          S_IDLE: begin
            wr <= 1'b0;
            if (rd) begin                      // first SOF slot seen
              fbuf  <= {{(FRAME_BITS-2){1'b0}}, 1'b1};
              slot  <= slot_t'(1);
              state <= S_FRAME;
            end
          end

          S_FRAME: begin
            fbuf <= {fbuf[FRAME_BITS-3:0], rd};
            slot <= slot + 1'b1;
            wr   <= 1'b0;
            if (int'(slot) == SOF_LAST && {fbuf[SOF_BITS-2:0], rd} != SOF_PATTERN) begin
              sof_error <= 1'b1;
              gap_cnt   <= GW'(IFS_BITS);
              state     <= S_GAP;
            end else if (int'(slot) == RW_SLOT) begin
              // Header complete: answer a command addressed to this node.
              if (hdr_now.rw && for_me_now) begin
                responding <= 1'b1;
                wr         <= resp_data[DATA_BITS-1];
                resp_sh    <= {resp_data[DATA_BITS-2:0], 1'b0};
                cmd_mpn    <= hdr_now.mpn;
              end
            end else if (int'(slot) == LAST_SLOT) begin
              responding <= 1'b0;
              frame_done <= 1'b1;
              if (for_me_full && !hdr_full.rw) begin
                rx_valid <= 1'b1;
                rx_frame <= '{mpn: hdr_full.mpn, sid: hdr_full.sid,
                              data: full_frame[DATA_BITS-1:0]};
              end else if (for_me_full && hdr_full.rw) begin
                cmd_served <= 1'b1;
              end else begin
                not_for_me <= 1'b1;
              end
              gap_cnt <= GW'(IFS_BITS);
              state   <= (IFS_BITS == 0) ? S_IDLE : S_GAP;
            end else if (responding) begin
              wr      <= resp_sh[DATA_BITS-1];
              resp_sh <= {resp_sh[DATA_BITS-2:0], 1'b0};
            end
          end

          S_GAP: begin
            wr         <= 1'b0;
            responding <= 1'b0;
            if (gap_cnt <= GW'(1)) begin
              state <= S_IDLE;
            end else begin
              gap_cnt <= gap_cnt - 1'b1;
            end
          end

          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // The slave only drives the wire while it answers a command.
  a_wr_only_when_responding: assert property (@(posedge clk) disable iff (!rst_n)
    wr |-> responding);

endmodule
