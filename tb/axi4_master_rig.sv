// axi4_master_rig: one axi4_master against the behavioural slave model, run
// through five sessions: clean, one corrupted read beat, SLVERR on write
// responses, SLVERR on read data, clean again. The slave stalls 30% of the
// clocks on every channel.
//
// Independently of the master it predicts each burst address and length,
// each write byte and WLAST, the 16-clock start count, the BREADY and
// RREADY timing (ready on the clock after VALID is first seen; BREADY for one
// clock only), that reads begin only after all write responses, and at the
// end of each session the error flag, error kind and stored error byte.
module axi4_master_rig
  import axi4_pkg::*;
#(
  parameter int unsigned BURST_LEN  = 1,
  parameter int unsigned NUM_BURSTS = 3
) (
  input  logic        clk,
  input  logic        rstn,
  output logic        finished,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned n_err_sessions
);
  localparam int SESSIONS = 5;
  localparam int BEATS    = NUM_BURSTS * BURST_LEN;

  ax_t  aw, ar;
  w_t   w;
  b_t   b;
  r_t   r;
  logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rvalid, rready;
  logic init_txn, busy, writes_done, reads_done, c_done, error;
  data_t err_data;
  logic [2:0] err_kind;

  int   session;
  logic bresp_err, rresp_err, clr_count;
  int   corrupt_beat;

  axi4_master #(.BURST_LEN(BURST_LEN), .NUM_BURSTS(NUM_BURSTS)) dut (
    .aclk(clk), .aresetn(rstn), .*
  );

  axi4_slave_model slave (
    .clk, .rstn, .stall_pct(30), .bresp_err, .rresp_err, .corrupt_beat, .clr_count,
    .aw, .awvalid, .awready, .w, .wvalid, .wready, .b, .bvalid, .bready,
    .ar, .arvalid, .arready, .r, .rvalid, .rready
  );

  int unsigned v[5], hs[5];
  axi4_chan_checker #(.T(ax_t)) c0 (clk, rstn, awvalid, awready, aw, v[0], hs[0]);
  axi4_chan_checker #(.T(w_t))  c1 (clk, rstn, wvalid,  wready,  w,  v[1], hs[1]);
  axi4_chan_checker #(.T(b_t))  c2 (clk, rstn, bvalid,  bready,  b,  v[2], hs[2]);
  axi4_chan_checker #(.T(ax_t)) c3 (clk, rstn, arvalid, arready, ar, v[3], hs[3]);
  axi4_chan_checker #(.T(r_t))  c4 (clk, rstn, rvalid,  rready,  r,  v[4], hs[4]);

  function automatic data_t pattern(int k);
    return data_t'(10 * (k + 1));
  endfunction

  // error injection per session
  always_comb begin
    bresp_err    = (session == 2);
    rresp_err    = (session == 3);
    corrupt_beat = (session == 1) ? BEATS / 2 : -1;
  end

  assign finished = (session == SESSIONS);
  assign init_txn = !finished;
  assign clr_count = init_txn && !busy;

  int   aw_k, w_k, ar_k, cyc, start_cyc;
  logic awvalid_seen;
  logic p_bwait, p_bready, p_rwait;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      session <= 0; checks <= 0; failures <= 0; n_err_sessions <= 0;
      aw_k <= 0; w_k <= 0; ar_k <= 0; cyc <= 0; start_cyc <= 0; awvalid_seen <= 0;
      p_bwait <= 0; p_bready <= 0; p_rwait <= 0;
    end else begin
      automatic int c = 0, f = 0;
      cyc      <= cyc + 1;
      p_bwait  <= bvalid && !bready;
      p_bready <= bready;
      p_rwait  <= rvalid && !rready;
      if (init_txn && !busy) begin
        start_cyc <= cyc; aw_k <= 0; w_k <= 0; ar_k <= 0; awvalid_seen <= 0;
      end
      // start count: AWVALID first seen 18 edges after the start edge
      if (awvalid && !awvalid_seen) begin
        awvalid_seen <= 1;
        c++;
        if (cyc != start_cyc + 18) begin
          f++; $display("FAIL start count: AWVALID after %0d clocks", cyc - start_cyc);
        end
      end
      if (awvalid && awready) begin
        c++;
        if (aw.addr != addr_t'(8'h81 + aw_k * BURST_LEN) || aw.len != len_t'(BURST_LEN - 1) ||
            aw.size != 3'd0 || aw.burst != BURST_INCR || aw.cache != 4'b0011 || aw.id != '0) begin
          f++; $display("FAIL AW %0d: addr %h len %0d", aw_k, aw.addr, aw.len);
        end
        aw_k <= aw_k + 1;
      end
      if (wvalid && wready) begin
        c++;
        if (w.data != pattern(w_k) || w.last != ((w_k % BURST_LEN) == BURST_LEN - 1) || w.strb != 1'b1) begin
          f++; $display("FAIL W %0d: data %0d last %b", w_k, w.data, w.last);
        end
        w_k <= w_k + 1;
      end
      if (arvalid && arready) begin
        c++;
        if (ar.addr != addr_t'(8'h81 + ar_k * BURST_LEN) || ar.len != len_t'(BURST_LEN - 1) ||
            ar.burst != BURST_INCR || !writes_done) begin
          f++; $display("FAIL AR %0d: addr %h len %0d writes_done %b", ar_k, ar.addr, ar.len, writes_done);
        end
        ar_k <= ar_k + 1;
      end
      // ready timing of the response channels
      if (p_bwait) begin
        c++;
        if (!bready) begin f++; $display("FAIL BREADY not raised the clock after BVALID"); end
      end
      if (p_bready && bready) begin
        f++; c++; $display("FAIL BREADY held for two clocks");
      end
      if (p_rwait) begin
        c++;
        if (!rready) begin f++; $display("FAIL RREADY not raised the clock after RVALID"); end
      end
      // end of session
      if (c_done && dut.state == dut.S_IDLE && busy == 0 && init_txn && session < SESSIONS) begin
        automatic logic [2:0] want_kind = {session == 3, session == 2, session == 1};
        c += 3;
        if (error != (want_kind != 0) || err_kind != want_kind) begin
          f++; $display("FAIL session %0d: error %b kind %b", session, error, err_kind);
        end
        if (session == 1 && err_data != ~pattern(BEATS / 2)) begin
          f++; $display("FAIL session 1: err_data %0d", err_data);
        end
        if (aw_k != NUM_BURSTS || ar_k != NUM_BURSTS || w_k != BEATS || !writes_done || !reads_done) begin
          f++; $display("FAIL session %0d: counts aw %0d ar %0d w %0d", session, aw_k, ar_k, w_k);
        end
        if (error) n_err_sessions <= n_err_sessions + 1;
        session <= session + 1;
      end
      checks   <= checks + c;
      failures <= failures + f;
    end
  end

  function automatic int unsigned violations();
    return v[0] + v[1] + v[2] + v[3] + v[4];
  endfunction
endmodule
