// axi4_master: AXI-4 burst master that writes a data pattern to a slave,
// reads it back and checks it.
//
// A five-state controller runs one test session:
//   IDLE    - reset values; leaves for COUNTER when init_txn is high.
//   COUNTER - waits START_COUNT (16) clocks before the first write.
//   WRITE   - issues NUM_BURSTS write bursts of BURST_LEN beats, one at a
//             time; leaves when the write response of the last one is in.
//   READ    - issues the same bursts as reads; leaves after the last beat.
//   FINAL   - the comparison is complete: c_done goes high, and error
//             tells whether any beat or response was wrong. Back to IDLE.
//
// Each burst targets BASE_ADDR + offset; the offset starts at FIRST_OFFSET
// and advances by one burst (BURST_LEN beats of one byte) per burst. The
// bursts are INCR type with AWSIZE = 0 (one byte per beat on the 8-bit bus),
// AWCACHE = 4'b0011 (bufferable, cacheable). Beat k of the session (k from 0)
// carries the byte DATA_STEP*(k+1), which gives 10, 20, 30 for the default
// three single-beat bursts.
//
// Channel handshakes, as the design describes them:
//   AWVALID/WVALID rise together when a burst starts and fall on their own
//   handshakes (WVALID after the WLAST beat); WLAST is set while the beat
//   counter equals BURST_LEN-1.
//   BREADY rises the clock after BVALID is seen and stays up one clock.
//   RREADY rises the clock after RVALID is seen, then stays up until the
//   RLAST beat is taken, so a burst streams at one beat per clock.
// A read beat whose data differs from the pattern, or any response that is
// not OKAY or carries the wrong ID, sets error; the first offending read
// data byte is kept in err_data and the kind of each error in err_kind
// (bit 0 read data mismatch, bit 1 write response, bit 2 read response).
//
// BASE_ADDR = 8'h80, START_COUNT = 16, the state set, the burst encodings
// and the BREADY/RREADY behaviour follow the design. FIRST_OFFSET = 1,
// DATA_STEP = 10, BURST_LEN = 1 and NUM_BURSTS = 3 reproduce the session the
// design is demonstrated with. One outstanding burst per direction, the
// init_txn start input and the err_kind split are this design's own
// choices. Reset (ARESETN) is asynchronous and active low.
module axi4_master
  import axi4_pkg::*;
#(
  parameter addr_t       BASE_ADDR    = 8'h80,
  parameter int unsigned START_COUNT  = 16,
  parameter int unsigned BURST_LEN    = 1,     // beats per burst, 1..256
  parameter int unsigned NUM_BURSTS   = 3,
  parameter addr_t       FIRST_OFFSET = 8'd1,
  parameter data_t       DATA_STEP    = 8'd10,
  parameter id_t         M_ID         = '0
) (
  input  logic       aclk,
  input  logic       aresetn,
  input  logic       init_txn,   // start a session (sampled in IDLE)
  // write address channel
  output ax_t        aw,
  output logic       awvalid,
  input  logic       awready,
  // write data channel
  output w_t         w,
  output logic       wvalid,
  input  logic       wready,
  // write response channel
  input  b_t         b,
  input  logic       bvalid,
  output logic       bready,
  // read address channel
  output ax_t        ar,
  output logic       arvalid,
  input  logic       arready,
  // read data channel
  input  r_t         r,
  input  logic       rvalid,
  output logic       rready,
  // status
  output logic       busy,
  output logic       writes_done,
  output logic       reads_done,
  output logic       c_done,     // session compared (level until next start)
  output logic       error,      // some beat or response was wrong
  output data_t      err_data,   // first mismatching read data
  output logic [2:0] err_kind
);

  typedef enum logic [2:0] {
    S_IDLE, S_COUNTER, S_WRITE, S_READ, S_FINAL
  } mstate_e;

  localparam int unsigned CNT_W   = $clog2(START_COUNT + 1);
  localparam int unsigned BEAT_W  = $clog2(BURST_LEN + 1);
  localparam int unsigned BURST_W = $clog2(NUM_BURSTS + 1);
  localparam int unsigned TOTAL_W = $clog2(NUM_BURSTS * BURST_LEN + 1);
  localparam size_t       SIZE    = size_t'($clog2(STRB_W));
  localparam addr_t       STRIDE  = addr_t'(BURST_LEN * STRB_W);

  mstate_e state;
  logic [CNT_W-1:0]   start_cnt;
  // write side
  addr_t              aw_off;
  logic               w_active;
  logic [BURST_W-1:0] w_issued, b_seen;
  logic [BEAT_W-1:0]  w_beat;
  logic [TOTAL_W-1:0] w_total;
  // read side
  addr_t              ar_off;
  logic               r_active;
  logic [BURST_W-1:0] r_issued, r_bursts;
  logic [TOTAL_W-1:0] r_total;

  logic  wnext, rnext, bnext;
  data_t r_expect;
  logic  rd_mismatch, wr_resp_err, rd_resp_err;

  assign wnext = wvalid && wready;
  assign rnext = rvalid && rready;
  assign bnext = bvalid && bready;

  // ---------------- channel payloads ---------------------------------------
  always_comb begin
    aw       = '0;
    aw.id    = M_ID;
    aw.addr  = BASE_ADDR + aw_off;
    aw.len   = len_t'(BURST_LEN - 1);
    aw.size  = SIZE;
    aw.burst = BURST_INCR;
    aw.cache = CACHE_BUF_MOD;
    ar       = aw;
    ar.addr  = BASE_ADDR + ar_off;
    w.data   = data_t'(DATA_STEP * (data_t'(w_total) + 8'd1));
    w.strb   = '1;
    w.last   = (w_beat == BEAT_W'(BURST_LEN - 1));
  end

  assign r_expect    = data_t'(DATA_STEP * (data_t'(r_total) + 8'd1));
  assign rd_mismatch = rnext && (r.data != r_expect);
  assign rd_resp_err = rnext && ((r.resp != RESP_OKAY) || (r.id != M_ID));
  assign wr_resp_err = bnext && ((b.resp != RESP_OKAY) || (b.id != M_ID));

  assign busy = (state != S_IDLE);

  // ---------------- master FSM and both channel engines --------------------
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state       <= S_IDLE;
      start_cnt   <= '0;
      awvalid     <= 1'b0;
      wvalid      <= 1'b0;
      bready      <= 1'b0;
      arvalid     <= 1'b0;
      rready      <= 1'b0;
      aw_off      <= FIRST_OFFSET;
      ar_off      <= FIRST_OFFSET;
      w_active    <= 1'b0;
      r_active    <= 1'b0;
      w_issued    <= '0;
      b_seen      <= '0;
      r_issued    <= '0;
      r_bursts    <= '0;
      w_beat      <= '0;
      w_total     <= '0;
      r_total     <= '0;
      writes_done <= 1'b0;
      reads_done  <= 1'b0;
      c_done      <= 1'b0;
      error       <= 1'b0;
      err_data    <= '0;
      err_kind    <= '0;
    end else begin
      // ---- write address / write data: start a burst, drop on handshake
      if (awvalid && awready) begin
        awvalid <= 1'b0;
        aw_off  <= aw_off + STRIDE;
      end
      if (wnext) begin
        w_total <= w_total + 1'b1;
        if (w.last) begin
          wvalid <= 1'b0;
          w_beat <= '0;
        end else begin
          w_beat <= w_beat + 1'b1;
        end
      end
      // ---- write response: ready the clock after BVALID, for one clock
      if (bvalid && !bready) bready <= 1'b1;
      else                   bready <= 1'b0;
      if (bnext) begin
        w_active <= 1'b0;
        b_seen   <= b_seen + 1'b1;
        if (b_seen == BURST_W'(NUM_BURSTS - 1)) writes_done <= 1'b1;
      end
      // ---- read address: drop on handshake
      if (arvalid && arready) begin
        arvalid <= 1'b0;
        ar_off  <= ar_off + STRIDE;
      end
      // ---- read data: ready the clock after RVALID, hold until RLAST
      if (rvalid && !rready)       rready <= 1'b1;
      else if (rnext && r.last)    rready <= 1'b0;
      if (rnext) begin
        r_total <= r_total + 1'b1;
        if (r.last) begin
          r_active <= 1'b0;
          r_bursts <= r_bursts + 1'b1;
          if (r_bursts == BURST_W'(NUM_BURSTS - 1)) reads_done <= 1'b1;
        end
      end
      // ---- error register: flags accumulate, first bad data is kept
      if (rd_mismatch) begin
        if (err_kind[0] == 1'b0) err_data <= r.data;
        err_kind[0] <= 1'b1;
      end
      if (wr_resp_err) err_kind[1] <= 1'b1;
      if (rd_resp_err) err_kind[2] <= 1'b1;

      // ---- session controller
      unique case (state)
        S_IDLE: begin
          if (init_txn) begin
            state       <= S_COUNTER;
            start_cnt   <= '0;
            aw_off      <= FIRST_OFFSET;
            ar_off      <= FIRST_OFFSET;
            w_issued    <= '0;
            b_seen      <= '0;
            r_issued    <= '0;
            r_bursts    <= '0;
            w_beat      <= '0;
            w_total     <= '0;
            r_total     <= '0;
            writes_done <= 1'b0;
            reads_done  <= 1'b0;
            c_done      <= 1'b0;
            error       <= 1'b0;
            err_data    <= '0;
            err_kind    <= '0;
          end
        end
        S_COUNTER: begin
          if (start_cnt == CNT_W'(START_COUNT - 1)) state <= S_WRITE;
          start_cnt <= start_cnt + 1'b1;
        end
        S_WRITE: begin
          if (writes_done) begin
            state <= S_READ;
          end else if (!w_active && (w_issued != BURST_W'(NUM_BURSTS))) begin
            awvalid  <= 1'b1;
            wvalid   <= 1'b1;
            w_active <= 1'b1;
            w_issued <= w_issued + 1'b1;
          end
        end
        S_READ: begin
          if (reads_done) begin
            state <= S_FINAL;
          end else if (!r_active && (r_issued != BURST_W'(NUM_BURSTS))) begin
            arvalid  <= 1'b1;
            r_active <= 1'b1;
            r_issued <= r_issued + 1'b1;
          end
        end
        S_FINAL: begin
          c_done <= 1'b1;
          error  <= |err_kind;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
