// tb_axi4_interconnect: drives the master side of the interconnect with
// bursts and puts the behavioural slave (30% random stalls) on the other.
//
// Phase 1 writes random bursts into the low half of the memory; phase 2
// writes the high half while reading the low half back, so both state
// machines run at once; phase 3 reads the high half back. Every read byte is
// checked against a reference memory. Monitors check the ordering the
// interconnect enforces: no write beat reaches the slave before its address,
// no write response reaches the master before the WLAST beat, no read beat
// before its address, and at most one burst per direction in flight.
// Phase 4 sends a 4-beat burst whose WLAST comes on beat 2 and expects the
// sticky protocol-error flag, which must stay low until then.
module tb_axi4_interconnect;
  import axi4_pkg::*;
  logic clk = 1'b0;
  logic rstn = 1'b0;
  always #5 clk = ~clk;

  ax_t  m_aw, m_ar, s_aw, s_ar;
  w_t   m_w, s_w;
  b_t   m_b, s_b;
  r_t   m_r, s_r;
  logic m_awvalid, m_awready, m_wvalid, m_wready, m_bvalid, m_bready;
  logic m_arvalid, m_arready, m_rvalid, m_rready;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic proto_err;
  int unsigned checks = 0, failures = 0;
  int unsigned mon_checks, mon_fail;
  data_t ref_mem [256];

  axi4_interconnect dut (.aclk(clk), .aresetn(rstn), .*);

  axi4_slave_model slave (
    .clk, .rstn, .stall_pct(30), .bresp_err(1'b0), .rresp_err(1'b0), .corrupt_beat(-1),
    .clr_count(1'b0),
    .aw(s_aw), .awvalid(s_awvalid), .awready(s_awready), .w(s_w), .wvalid(s_wvalid),
    .wready(s_wready), .b(s_b), .bvalid(s_bvalid), .bready(s_bready), .ar(s_ar),
    .arvalid(s_arvalid), .arready(s_arready), .r(s_r), .rvalid(s_rvalid), .rready(s_rready)
  );

  int unsigned v[10], hs[10];
  axi4_chan_checker #(.T(ax_t)) c0 (clk, rstn, m_awvalid, m_awready, m_aw, v[0], hs[0]);
  axi4_chan_checker #(.T(w_t))  c1 (clk, rstn, m_wvalid,  m_wready,  m_w,  v[1], hs[1]);
  axi4_chan_checker #(.T(b_t))  c2 (clk, rstn, m_bvalid,  m_bready,  m_b,  v[2], hs[2]);
  axi4_chan_checker #(.T(ax_t)) c3 (clk, rstn, m_arvalid, m_arready, m_ar, v[3], hs[3]);
  axi4_chan_checker #(.T(r_t))  c4 (clk, rstn, m_rvalid,  m_rready,  m_r,  v[4], hs[4]);
  axi4_chan_checker #(.T(ax_t)) c5 (clk, rstn, s_awvalid, s_awready, s_aw, v[5], hs[5]);
  axi4_chan_checker #(.T(w_t))  c6 (clk, rstn, s_wvalid,  s_wready,  s_w,  v[6], hs[6]);
  axi4_chan_checker #(.T(b_t))  c7 (clk, rstn, s_bvalid,  s_bready,  s_b,  v[7], hs[7]);
  axi4_chan_checker #(.T(ax_t)) c8 (clk, rstn, s_arvalid, s_arready, s_ar, v[8], hs[8]);
  axi4_chan_checker #(.T(r_t))  c9 (clk, rstn, s_rvalid,  s_rready,  s_r,  v[9], hs[9]);

  // ---- ordering monitors
  logic aw_in, wl_in, ar_in;
  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      aw_in <= 0; wl_in <= 0; ar_in <= 0; mon_checks <= 0; mon_fail <= 0;
    end else begin
      automatic int c = 0, f = 0;
      if (s_awvalid) begin c++; if (aw_in) f++; end          // second burst in flight
      if (s_wvalid)  begin c++; if (!aw_in || wl_in) f++; end
      if (m_bvalid)  begin c++; if (!wl_in) f++; end
      if (s_arvalid) begin c++; if (ar_in) f++; end
      if (m_rvalid)  begin c++; if (!ar_in) f++; end
      if (s_awvalid && s_awready) aw_in <= 1;
      if (s_wvalid && s_wready && s_w.last) wl_in <= 1;
      if (m_bvalid && m_bready) begin aw_in <= 0; wl_in <= 0; end
      if (s_arvalid && s_arready) ar_in <= 1;
      if (m_rvalid && m_rready && m_r.last) ar_in <= 0;
      mon_checks <= mon_checks + c;
      mon_fail   <= mon_fail + f;
    end
  end

  task automatic write_burst(addr_t a, int len, int last_at);
    data_t d [$];
    int beat;
    for (int i = 0; i <= len; i++) d.push_back(data_t'($urandom));
    m_aw <= '{id: 1'b0, addr: a, len: len_t'(len), size: 3'd0, burst: BURST_INCR,
              lock: 1'b0, cache: 4'b0011, prot: 3'd0, qos: 4'd0};
    m_awvalid <= 1'b1;
    m_w <= '{data: d[0], strb: 1'b1, last: (last_at == 0)};
    m_wvalid <= 1'b1;
    beat = 0;
    while (m_awvalid || beat <= last_at) begin
      @(posedge clk);
      if (m_awvalid && m_awready) m_awvalid <= 1'b0;
      if (m_wvalid && m_wready) begin
        ref_mem[addr_t'(a + beat)] = d[beat];
        beat++;
        if (beat <= last_at) m_w <= '{data: d[beat], strb: 1'b1, last: (beat == last_at)};
        else                 m_wvalid <= 1'b0;
      end
    end
    m_bready <= 1'b1;
    do @(posedge clk); while (!(m_bvalid && m_bready));
    m_bready <= 1'b0;
    checks++;
    if (m_b.resp != RESP_OKAY) begin failures++; $display("FAIL write response"); end
  endtask

  task automatic read_burst(addr_t a, int len);
    m_ar <= '{id: 1'b1, addr: a, len: len_t'(len), size: 3'd0, burst: BURST_INCR,
              lock: 1'b0, cache: 4'b0011, prot: 3'd0, qos: 4'd0};
    m_arvalid <= 1'b1;
    do @(posedge clk); while (!(m_arvalid && m_arready));
    m_arvalid <= 1'b0;
    m_rready  <= 1'b1;
    for (int i = 0; i <= len; i++) begin
      do @(posedge clk); while (!(m_rvalid && m_rready));
      checks++;
      if (m_r.data != ref_mem[addr_t'(a + i)] || m_r.last != (i == len) || m_r.id != 1'b1) begin
        failures++;
        $display("FAIL read %h beat %0d: %h want %h", a, i, m_r.data, ref_mem[addr_t'(a + i)]);
      end
    end
    m_rready <= 1'b0;
  endtask

  task automatic report();
    checks   += mon_checks + 11;
    failures += mon_fail;
    for (int i = 0; i < 10; i++)
      if (v[i] != 0) begin failures++; $display("FAIL handshake rule on channel %0d", i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    m_aw = '0; m_ar = '0; m_w = '0;
    m_awvalid = 0; m_wvalid = 0; m_bready = 0; m_arvalid = 0; m_rready = 0;
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    @(posedge clk);
    // phase 1: fill the low half with 16 eight-beat bursts
    for (int k = 0; k < 16; k++) write_burst(addr_t'(k * 8), 7, 7);
    // phase 2: high half written while the low half is read back
    fork
      for (int k = 0; k < 16; k++) write_burst(addr_t'(8'h80 + k * 8), 7, 7);
      for (int k = 0; k < 16; k++) read_burst(addr_t'(k * 8), 7);
    join
    // phase 3: random-length reads of the high half
    for (int k = 0; k < 10; k++) read_burst(addr_t'(8'h80 + ($urandom % 96)), $urandom % 32);
    checks++;
    if (proto_err) begin failures++; $display("FAIL protocol error flag raised by legal traffic"); end
    // phase 4: WLAST on beat 2 of a 4-beat burst
    write_burst(8'h10, 3, 1);
    repeat (2) @(posedge clk);
    checks++;
    if (!proto_err) begin failures++; $display("FAIL short burst not flagged"); end
    report();
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    report();
    $finish;
  end
endmodule
