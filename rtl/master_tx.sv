// master_tx: master side of a node - sends frames and arbitrates bit by bit.
//
// A master with a frame ready and a share left waits until the wire is free,
// then sends its frame one bit per bit slot, most significant bit first:
// SOF, its own priority number (MPN), the slave ID, R/W and, for a data frame,
// the 64 data bits. After each slot it reads the wire back. A 1 from any node
// dominates the wire, so a master that sent 0 and reads 1 has lost
// arbitration: it releases the wire at once, keeps its frame and tries again
// once the wire is free (its slave side receives the rest of the winning
// frame meanwhile). Masters start only on a free wire, so the first
// difference is always in the MPN field and the highest MPN wins; nobody is
// pre-empted once a frame runs. A master that completes the header of a
// command frame has won: it releases the wire and reads the 64 response bits
// the addressed slave drives. Every won frame takes one share (`consume`).
//
// From the protocol: the flow of the master procedure (frame ready and share
// > 0, wait while busy, transmit and read back each bit, loss when they
// differ, share decremented on a win, command frames read the reply). This
// design's choices: a 1 is the dominant level, so a larger MPN means a higher
// priority; a command frame takes its share when its header has won, like a
// data frame (the text decrements on every successful access).
//
// Interface: hold `tx_valid` and `tx_frame` stable until `tx_done`. Pulses
// (one clock): tx_done, won, lost, consume, rd_valid (with rd_data, the reply
// to a command), deferred (a ready frame had to wait for a busy wire),
// no_share (a ready frame was held back because the share is used up).
// Timing: as frame_rx - on `bit_tick`, `rd` is the slot that ends and `wr`
// is set for the slot that begins.
module master_tx
  import swmm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      bit_tick,
  input  logic      rd,          // read line
  output logic      wr,          // write line
  input  mpn_t      my_mpn,
  input  logic      tx_valid,
  input  tx_frame_t tx_frame,
  input  logic      can_send,    // share left
  input  logic      bus_free,    // from the node's receiver
  output logic      active,      // this master owns the wire
  output logic      tx_done,
  output logic      won,
  output logic      lost,
  output logic      consume,
  output logic      rd_valid,
  output data_t     rd_data,
  output logic      deferred,
  output logic      no_share
);

  typedef enum logic [1:0] {M_IDLE, M_TX, M_RESP} mstate_t;

  mstate_t                 state;
  logic [FRAME_BITS-1:0]   sh;      // bits still to send, next one at the top
  slot_t                   idx;     // slot whose level is on the wire now
  logic                    is_cmd;
  slot_t                   last_tx; // last slot this master drives

  header_t hdr;
  assign hdr = '{sof: SOF_PATTERN, mpn: my_mpn, sid: tx_frame.sid, rw: tx_frame.rw};

  assign active = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= M_IDLE;
      sh       <= '0;
      idx      <= '0;
      is_cmd   <= 1'b0;
      last_tx  <= '0;
      wr       <= 1'b0;
      tx_done  <= 1'b0;
      won      <= 1'b0;
      lost     <= 1'b0;
      consume  <= 1'b0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
      deferred <= 1'b0;
      no_share <= 1'b0;
    end else begin
      tx_done  <= 1'b0;
      won      <= 1'b0;
      lost     <= 1'b0;
      consume  <= 1'b0;
      rd_valid <= 1'b0;
      deferred <= 1'b0;
      no_share <= 1'b0;
      if (bit_tick) begin
        unique case (state)
          M_IDLE: begin
            wr <= 1'b0;
            if (tx_valid && !can_send) begin
              no_share <= 1'b1;               // stay a slave for now
            end else if (tx_valid && !bus_free) begin
              deferred <= 1'b1;               // wire busy: wait
            end else if (tx_valid) begin
              // Start: drive slot 0 now, keep the rest in the shift register.
              sh      <= {hdr, (tx_frame.rw ? '0 : tx_frame.data)} << 1;
              wr      <= SOF_PATTERN[SOF_BITS-1];
              idx     <= '0;
              is_cmd  <= tx_frame.rw;
              last_tx <= tx_frame.rw ? slot_t'(RW_SLOT) : slot_t'(LAST_SLOT);
              state   <= M_TX;
            end
          end

          M_TX: begin
            if (rd != wr) begin
              // Sent 0, read 1: another master is on the wire.
              wr    <= 1'b0;
              lost  <= 1'b1;
              state <= M_IDLE;
            end else if (idx == last_tx) begin
              wr      <= 1'b0;
              won     <= 1'b1;
              consume <= 1'b1;
              if (is_cmd) begin
                idx   <= idx + 1'b1;
                state <= M_RESP;
              end else begin
                tx_done <= 1'b1;
                state   <= M_IDLE;
              end
            end else begin
              wr  <= sh[FRAME_BITS-1];
              sh  <= sh << 1;
              idx <= idx + 1'b1;
            end
          end

          M_RESP: begin
            // The addressed slave drives slots 29..92; read them in.
            wr      <= 1'b0;
            rd_data <= {rd_data[DATA_BITS-2:0], rd};
            idx     <= idx + 1'b1;
            if (idx == slot_t'(LAST_SLOT)) begin
              rd_valid <= 1'b1;
              tx_done  <= 1'b1;
              state    <= M_IDLE;
            end
          end

          default: state <= M_IDLE;
        endcase
      end
    end
  end

  // On a wired-OR wire a driven 1 always reads back as 1.
  a_dominant_one: assert property (@(posedge clk) disable iff (!rst_n)
    bit_tick && state == M_TX && wr |-> rd);

  // Frames start only on a free wire.
  a_start_on_free: assert property (@(posedge clk) disable iff (!rst_n)
    bit_tick && state == M_IDLE && tx_valid && can_send && !bus_free |=> state == M_IDLE);

endmodule
