// tb_axi4_top_full: one session of the complete system at its default
// parameters, the demonstration transfer of the design.
//
// Expected, worked out from the defaults rather than taken from the design:
// after reset and init_txn, a 16-clock start count (the first write
// address handshake comes 18 clocks after BUSY is first seen high), then three single-beat INCR
// writes of 10, 20, 30 to 8'h81, 8'h82, 8'h83 (AWLEN 0, AWSIZE 0, AWBURST
// INCR, AWCACHE 4'b0011), each answered OKAY, then three reads of the same
// addresses returning 10, 20, 30 with RLAST on every beat and RRESP OKAY;
// c_done rises with error low. The RAM contents are checked as well.
module tb_axi4_top_full;
  import axi4_pkg::*;
  logic clk = 1'b0;
  logic rstn = 1'b0;
  always #5 clk = ~clk;

  logic init_txn, busy, writes_done, reads_done, c_done, error, proto_err;
  data_t err_data;
  logic [2:0] err_kind;
  int unsigned checks = 0, failures = 0;
  logic busy_seen = 1'b0;
  int unsigned cyc = 0, start_cyc = 0, aw_k = 0, w_k = 0, b_k = 0, ar_k = 0, r_k = 0;

  axi4_top dut (.aclk(clk), .aresetn(rstn), .*);

  function automatic void expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: %0d, want %0d", what, got, want);
    end
  endfunction

  always @(posedge clk) if (rstn) begin
    cyc++;
    if (busy && !busy_seen) begin busy_seen = 1'b1; start_cyc = cyc; end
    if (dut.m_awvalid && dut.m_awready) begin
      if (aw_k == 0) expect_eq("clocks from start to first write address", cyc - start_cyc, 18);
      expect_eq("AWADDR", dut.m_aw.addr, 8'h81 + aw_k);
      expect_eq("AWLEN", dut.m_aw.len, 0);
      expect_eq("AWSIZE", dut.m_aw.size, 0);
      expect_eq("AWBURST", dut.m_aw.burst, 1);
      expect_eq("AWCACHE", dut.m_aw.cache, 3);
      aw_k++;
    end
    if (dut.m_wvalid && dut.m_wready) begin
      expect_eq("WDATA", dut.m_w.data, 10 * (w_k + 1));
      expect_eq("WLAST", dut.m_w.last, 1);
      w_k++;
    end
    if (dut.m_bvalid && dut.m_bready) begin
      expect_eq("BRESP", dut.m_b.resp, 0);
      b_k++;
    end
    if (dut.m_arvalid && dut.m_arready) begin
      expect_eq("ARADDR", dut.m_ar.addr, 8'h81 + ar_k);
      expect_eq("ARLEN", dut.m_ar.len, 0);
      ar_k++;
    end
    if (dut.m_rvalid && dut.m_rready) begin
      expect_eq("RDATA", dut.m_r.data, 10 * (r_k + 1));
      expect_eq("RLAST", dut.m_r.last, 1);
      expect_eq("RRESP", dut.m_r.resp, 0);
      r_k++;
    end
  end

  task automatic report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    init_txn = 1'b0;
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    @(posedge clk);
    init_txn = 1'b1;
    wait (busy);
    init_txn = 1'b0;
    wait (c_done);
    @(posedge clk);
    expect_eq("error", error, 0);
    expect_eq("protocol error", proto_err, 0);
    expect_eq("writes done", writes_done, 1);
    expect_eq("reads done", reads_done, 1);
    expect_eq("bursts written", aw_k, 3);
    expect_eq("bursts read", ar_k, 3);
    expect_eq("write responses", b_k, 3);
    expect_eq("read beats", r_k, 3);
    for (int i = 0; i < 3; i++) expect_eq("RAM byte", dut.u_slave.u_bram.mem[8'h81 + i], 10 * (i + 1));
    $display("session took %0d clocks", cyc - start_cyc);
    report();
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    report();
    $finish;
  end
endmodule
