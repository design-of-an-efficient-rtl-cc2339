// axi4_top_harness: one axi4_top with an independent scoreboard, used by the
// end-to-end testbench to run the system in several configurations.
//
// The scoreboard keeps its own model of the slave memory. It predicts every
// write address, write byte and read address from the parameters alone,
// updates the model on each write beat (with the address folded into
// MEM_DEPTH, as the RAM does), predicts each read beat from the model, and at
// the end of a session compares the expected error flag and first bad byte
// with what the master reports. It also counts how often each mechanism of
// the design happened, and checks the VALID/READY rules on all ten
// master-side and slave-side channels.
module axi4_top_harness
  import axi4_pkg::*;
#(
  parameter int unsigned BURST_LEN  = 1,
  parameter int unsigned NUM_BURSTS = 3,
  parameter int unsigned MEM_DEPTH  = 256,
  parameter int unsigned SESSIONS   = 2
) (
  input  logic        clk,
  input  logic        rstn,
  output logic        finished,
  output int unsigned checks,
  output int unsigned failures,
  // mechanism counters
  output int unsigned n_wait_ok,     // start count of exactly 16 clocks
  output int unsigned n_aw, n_w, n_wlast, n_b, n_ar, n_r, n_rlast,
  output int unsigned n_bready_late, // BREADY raised the clock after BVALID
  output int unsigned n_rstream,     // read beats on consecutive clocks
  output int unsigned n_cmp_ok, n_cmp_err
);

  localparam addr_t BASE  = 8'h80;
  localparam addr_t FIRST = 8'd1;
  localparam data_t STEP  = 8'd10;
  localparam int    START = 16;

  logic init_txn;
  logic busy, writes_done, reads_done, c_done, error, proto_err;
  data_t err_data;
  logic [2:0] err_kind;

  axi4_top #(.BURST_LEN(BURST_LEN), .NUM_BURSTS(NUM_BURSTS), .MEM_DEPTH(MEM_DEPTH)) dut (
    .aclk(clk), .aresetn(rstn), .init_txn,
    .busy, .writes_done, .reads_done, .c_done, .error, .err_data, .err_kind, .proto_err
  );

  // ---- handshake rule checkers on both sides of the interconnect
  int unsigned v[10], hs[10];
  axi4_chan_checker #(.T(ax_t)) c0 (clk, rstn, dut.m_awvalid, dut.m_awready, dut.m_aw, v[0], hs[0]);
  axi4_chan_checker #(.T(w_t))  c1 (clk, rstn, dut.m_wvalid,  dut.m_wready,  dut.m_w,  v[1], hs[1]);
  axi4_chan_checker #(.T(b_t))  c2 (clk, rstn, dut.m_bvalid,  dut.m_bready,  dut.m_b,  v[2], hs[2]);
  axi4_chan_checker #(.T(ax_t)) c3 (clk, rstn, dut.m_arvalid, dut.m_arready, dut.m_ar, v[3], hs[3]);
  axi4_chan_checker #(.T(r_t))  c4 (clk, rstn, dut.m_rvalid,  dut.m_rready,  dut.m_r,  v[4], hs[4]);
  axi4_chan_checker #(.T(ax_t)) c5 (clk, rstn, dut.s_awvalid, dut.s_awready, dut.s_aw, v[5], hs[5]);
  axi4_chan_checker #(.T(w_t))  c6 (clk, rstn, dut.s_wvalid,  dut.s_wready,  dut.s_w,  v[6], hs[6]);
  axi4_chan_checker #(.T(b_t))  c7 (clk, rstn, dut.s_bvalid,  dut.s_bready,  dut.s_b,  v[7], hs[7]);
  axi4_chan_checker #(.T(ax_t)) c8 (clk, rstn, dut.s_arvalid, dut.s_arready, dut.s_ar, v[8], hs[8]);
  axi4_chan_checker #(.T(r_t))  c9 (clk, rstn, dut.s_rvalid,  dut.s_rready,  dut.s_r,  v[9], hs[9]);

  // ---- scoreboard state
  data_t model [MEM_DEPTH];
  int unsigned aw_k, w_k, ar_k, r_k;   // bursts / beats seen in the current run
  int unsigned cyc, busy_cyc;
  int unsigned sessions_done;
  logic        exp_err;
  data_t       exp_err_data;
  logic        prev_bvalid, prev_rnext;
  logic [2:0]  prev_state;

  function automatic data_t pattern(int unsigned k);
    return data_t'(STEP * (k + 1));
  endfunction
  function automatic addr_t beat_addr(int unsigned k);
    return addr_t'(BASE + FIRST + k);
  endfunction

  assign finished = (sessions_done == SESSIONS);
  assign init_txn = !finished;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      checks <= 0; failures <= 0;
      n_wait_ok <= 0; n_aw <= 0; n_w <= 0; n_wlast <= 0; n_b <= 0;
      n_ar <= 0; n_r <= 0; n_rlast <= 0; n_bready_late <= 0; n_rstream <= 0;
      n_cmp_ok <= 0; n_cmp_err <= 0;
      aw_k <= 0; w_k <= 0; ar_k <= 0; r_k <= 0;
      cyc <= 0; busy_cyc <= 0; sessions_done <= 0;
      exp_err <= 1'b0; exp_err_data <= '0;
      prev_bvalid <= 1'b0; prev_rnext <= 1'b0; prev_state <= '0;
    end else begin
      automatic int unsigned c = 0, f = 0;
      cyc <= cyc + 1;
      prev_state  <= dut.u_master.state;
      prev_bvalid <= dut.m_bvalid && !dut.m_bready;
      prev_rnext  <= dut.m_rvalid && dut.m_rready;
      if (!busy && init_txn) begin
        busy_cyc <= cyc;  // session starts at this edge
        aw_k <= 0; w_k <= 0; ar_k <= 0; r_k <= 0;
        exp_err <= 1'b0;
      end
      // start count: first AWVALID START+1 clocks after the session began
      if (dut.m_awvalid && aw_k == 0 && !dut.m_awready && cyc == busy_cyc + START + 2)
        n_wait_ok <= n_wait_ok + 1;
      if (dut.m_awvalid && dut.m_awready) begin
        c++;
        if (dut.m_aw.addr != beat_addr(aw_k * BURST_LEN) || dut.m_aw.len != len_t'(BURST_LEN - 1) ||
            dut.m_aw.burst != BURST_INCR || dut.m_aw.size != 3'd0 || dut.m_aw.cache != 4'b0011) begin
          f++;
          $display("FAIL AW burst %0d addr %h len %0d", aw_k, dut.m_aw.addr, dut.m_aw.len);
        end
        aw_k <= aw_k + 1; n_aw <= n_aw + 1;
      end
      if (dut.m_wvalid && dut.m_wready) begin
        c++;
        if (dut.m_w.data != pattern(w_k) || dut.m_w.last != ((w_k % BURST_LEN) == BURST_LEN - 1)) begin
          f++;
          $display("FAIL W beat %0d data %0d last %b", w_k, dut.m_w.data, dut.m_w.last);
        end
        model[beat_addr(w_k) % MEM_DEPTH] <= dut.m_w.data;
        w_k <= w_k + 1; n_w <= n_w + 1;
        if (dut.m_w.last) n_wlast <= n_wlast + 1;
      end
      if (dut.m_bvalid && dut.m_bready) begin
        c++;
        if (dut.m_b.resp != RESP_OKAY) f++;
        n_b <= n_b + 1;
        if (prev_bvalid) n_bready_late <= n_bready_late + 1;
      end
      if (dut.m_arvalid && dut.m_arready) begin
        c++;
        if (dut.m_ar.addr != beat_addr(ar_k * BURST_LEN) || dut.m_ar.len != len_t'(BURST_LEN - 1)) begin
          f++;
          $display("FAIL AR burst %0d addr %h", ar_k, dut.m_ar.addr);
        end
        ar_k <= ar_k + 1; n_ar <= n_ar + 1;
      end
      if (dut.m_rvalid && dut.m_rready) begin
        automatic data_t want = model[beat_addr(r_k) % MEM_DEPTH];
        c++;
        if (dut.m_r.data != want || dut.m_r.resp != RESP_OKAY ||
            dut.m_r.last != ((r_k % BURST_LEN) == BURST_LEN - 1)) begin
          f++;
          $display("FAIL R beat %0d data %0d want %0d", r_k, dut.m_r.data, want);
        end
        if (want != pattern(r_k) && !exp_err) begin
          exp_err <= 1'b1; exp_err_data <= want;
        end
        r_k <= r_k + 1; n_r <= n_r + 1;
        if (dut.m_r.last) n_rlast <= n_rlast + 1;
        if (prev_rnext) n_rstream <= n_rstream + 1;
      end
      // end of a session: c_done rises as the master returns to IDLE
      if (dut.u_master.state == 3'd4) begin
        sessions_done <= sessions_done + 1;
      end
      if (c_done && dut.u_master.state == 3'd0 && prev_state == 3'd4) begin
        c += 3;
        if (error != exp_err) f++;
        if (exp_err && err_data != exp_err_data) f++;
        if (proto_err) f++;
        if (aw_k != NUM_BURSTS || ar_k != NUM_BURSTS || w_k != NUM_BURSTS * BURST_LEN ||
            r_k != NUM_BURSTS * BURST_LEN) f++;
        if (error) n_cmp_err <= n_cmp_err + 1; else n_cmp_ok <= n_cmp_ok + 1;
        $display("session end: error=%b expected=%b err_data=%0d kind=%b", error, exp_err, err_data, err_kind);
      end
      checks   <= checks + c;
      failures <= failures + f;
    end
  end

  function automatic int unsigned violations();
    int unsigned s = 0;
    for (int i = 0; i < 10; i++) s += v[i];
    return s;
  endfunction

endmodule
