// tb_axi4_slave: directed and random bursts into the AXI-4 slave.
//
// A bus-functional master drives the five channels with random VALID and
// READY gaps. Bursts of every type (FIXED, INCR, WRAP) and lengths from 1
// to 256 beats are written and read back; a reference memory with its own
// address arithmetic predicts every read byte. Also checked: BRESP/RRESP are
// OKAY, BID/RID echo AWID/ARID, RLAST falls on beat ARLEN, the handshake
// rules hold on all channels, and with RREADY held high a read burst of N
// beats streams in N consecutive clocks.
module tb_axi4_slave;
  import axi4_pkg::*;
  logic clk = 1'b0;
  logic rstn = 1'b0;
  always #5 clk = ~clk;

  ax_t  aw, ar;
  w_t   w;
  b_t   b;
  r_t   r;
  logic awvalid, awready, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rvalid, rready;
  int unsigned checks = 0, failures = 0;
  data_t ref_mem [256];
  int unsigned v[5], hs[5];
  logic random_gaps;

  axi4_slave dut (.aclk(clk), .aresetn(rstn), .*);

  axi4_chan_checker #(.T(ax_t)) c0 (clk, rstn, awvalid, awready, aw, v[0], hs[0]);
  axi4_chan_checker #(.T(w_t))  c1 (clk, rstn, wvalid,  wready,  w,  v[1], hs[1]);
  axi4_chan_checker #(.T(b_t))  c2 (clk, rstn, bvalid,  bready,  b,  v[2], hs[2]);
  axi4_chan_checker #(.T(ax_t)) c3 (clk, rstn, arvalid, arready, ar, v[3], hs[3]);
  axi4_chan_checker #(.T(r_t))  c4 (clk, rstn, rvalid,  rready,  r,  v[4], hs[4]);

  // reference address sequence, written independently of the package
  function automatic addr_t ref_addr(addr_t start, int beat, len_t len, burst_e bt);
    int unsigned bytes, lo;
    case (bt)
      BURST_FIXED: return start;
      BURST_INCR:  return addr_t'(start + beat);
      default: begin
        bytes = len + 1;                        // size 0: one byte per beat
        lo    = (start / bytes) * bytes;
        return addr_t'(lo + ((start - lo + beat) % bytes));
      end
    endcase
  endfunction

  task automatic gap();
    if (random_gaps) repeat ($urandom % 3) @(posedge clk);
  endtask

  task automatic write_burst(addr_t a, len_t len, burst_e bt, id_t id);
    data_t d [$];
    int beat;
    for (int i = 0; i <= len; i++) d.push_back(data_t'($urandom));
    // address and data run in parallel, one clock-stepped loop for both
    aw = '0; aw.addr = a; aw.len = len; aw.size = 0; aw.burst = bt; aw.id = id;
    aw.cache = CACHE_BUF_MOD;
    awvalid <= 1'b1;
    w.data <= d[0]; w.strb <= 1'b1; w.last <= (len == 0);
    wvalid <= random_gaps ? 1'($urandom) : 1'b1;
    beat = 0;
    while (awvalid || beat <= len) begin
      @(posedge clk);
      if (awvalid && awready) awvalid <= 1'b0;
      if (wvalid && wready) begin
        beat++;
        if (beat <= len) begin
          w.data <= d[beat]; w.last <= (beat == len);
          wvalid <= random_gaps ? 1'($urandom) : 1'b1;
        end else begin
          wvalid <= 1'b0;
        end
      end else if (!wvalid && beat <= len) begin
        wvalid <= 1'b1;
      end
    end
    for (int i = 0; i <= len; i++) ref_mem[ref_addr(a, i, len, bt)] = d[i];
    // response
    gap();
    bready <= 1'b1;
    do @(posedge clk); while (!(bvalid && bready));
    bready <= 1'b0;
    checks++;
    if (b.resp != RESP_OKAY || b.id != id) begin
      failures++;
      $display("FAIL write response %0d id %0d", b.resp, b.id);
    end
  endtask

  task automatic read_burst(addr_t a, len_t len, burst_e bt, id_t id, bit stream);
    int unsigned first_cyc, last_cyc, cyc, g;
    gap();
    ar = '0; ar.addr = a; ar.len = len; ar.size = 0; ar.burst = bt; ar.id = id;
    arvalid <= 1'b1;
    do @(posedge clk); while (!(arvalid && arready));
    arvalid <= 1'b0;
    cyc = 0;
    for (int i = 0; i <= len; i++) begin
      g = (!stream && random_gaps) ? $urandom % 3 : 0;
      if (g > 0) begin
        rready <= 1'b0;
        repeat (g) @(posedge clk);
      end
      rready <= 1'b1;
      do begin @(posedge clk); cyc++; end while (!(rvalid && rready));
      if (i == 0) first_cyc = cyc;
      last_cyc = cyc;
      checks++;
      if (r.data != ref_mem[ref_addr(a, i, len, bt)] || r.resp != RESP_OKAY || r.id != id ||
          r.last != (i == len)) begin
        failures++;
        $display("FAIL read beat %0d of %0d: data %h want %h last %b",
                 i, len, r.data, ref_mem[ref_addr(a, i, len, bt)], r.last);
      end
    end
    rready <= 1'b0;
    if (stream) begin
      checks++;
      if (last_cyc - first_cyc != len) begin
        failures++;
        $display("FAIL read burst of %0d beats took %0d clocks", len + 1, last_cyc - first_cyc + 1);
      end
    end
  endtask

  task automatic finish_tb();
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (v[i] != 0) begin failures++; $display("FAIL channel %0d handshake rule", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    burst_e bt;
    len_t   len;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    aw = '0; ar = '0; w = '0;
    random_gaps = 1'b0;
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    @(posedge clk);
    // fill the whole RAM with one 256-beat INCR burst, read it back streamed
    write_burst(8'h00, 8'd255, BURST_INCR, 1'b0);
    read_burst(8'h00, 8'd255, BURST_INCR, 1'b0, 1'b1);
    // directed bursts of each type
    write_burst(8'h81, 8'd0, BURST_INCR, 1'b1);
    write_burst(8'h40, 8'd7, BURST_FIXED, 1'b0);
    read_burst(8'h40, 8'd3, BURST_FIXED, 1'b1, 1'b1);
    write_burst(8'h2d, 8'd7, BURST_WRAP, 1'b1);     // wraps at 8'h30 back to 8'h28
    read_burst(8'h28, 8'd7, BURST_INCR, 1'b0, 1'b1);
    read_burst(8'h2e, 8'd3, BURST_WRAP, 1'b1, 1'b1);
    write_burst(8'hfe, 8'd3, BURST_INCR, 1'b0);      // rolls over the top of memory
    read_burst(8'hfe, 8'd3, BURST_INCR, 1'b0, 1'b1);
    // random bursts with random gaps
    random_gaps = 1'b1;
    for (int n = 0; n < 60; n++) begin
      case ($urandom % 3)
        0: begin bt = BURST_FIXED; len = len_t'($urandom % 16); end
        1: begin bt = BURST_INCR;  len = len_t'($urandom % 40); end
        default: begin bt = BURST_WRAP; len = len_t'((2 << ($urandom % 4)) - 1); end
      endcase
      if ($urandom % 2) write_burst(addr_t'($urandom), len, bt, id_t'($urandom));
      read_burst(addr_t'($urandom), len, bt, id_t'($urandom), 1'b0);
    end
    finish_tb();
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish_tb();
  end
endmodule
