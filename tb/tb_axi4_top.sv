// tb_axi4_top: end-to-end test of the AXI-4 master - interconnect - slave
// system in four configurations run side by side.
//
//   A  defaults: three single-beat bursts (bytes 10, 20, 30 at 8'h81..8'h83),
//      two sessions back to back.
//   B  four 16-beat bursts, so WLAST/RLAST fall inside long bursts and the
//      read data streams at one beat per clock.
//   C  defaults with a 2-byte RAM: the three addresses alias, the first read
//      returns 30 instead of 10, and the master must flag the mismatch and
//      keep the bad byte in its error register.
//   D  one 256-beat burst, the longest AXI-4 INCR burst: the addresses run
//      past 8'hFF and wrap to the bottom of the RAM.
//
// Each harness checks every handshake and beat against its own model. Here
// the mechanism counts are checked: each must have happened at least once
// (and the start count must have been exactly 16 clocks in every session).
module tb_axi4_top;
  logic clk = 1'b0;
  logic rstn = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks, failures;
  logic fa, fb, fc, fd;
  int unsigned ca, cb, cc, cd, xa, xb, xc, xd;
  int unsigned wa[12], wb[12], wc[12], wd[12];

  axi4_top_harness #(.SESSIONS(2)) ha (clk, rstn, fa, ca, xa,
    wa[0], wa[1], wa[2], wa[3], wa[4], wa[5], wa[6], wa[7], wa[8], wa[9], wa[10], wa[11]);
  axi4_top_harness #(.BURST_LEN(16), .NUM_BURSTS(4), .SESSIONS(1)) hb (clk, rstn, fb, cb, xb,
    wb[0], wb[1], wb[2], wb[3], wb[4], wb[5], wb[6], wb[7], wb[8], wb[9], wb[10], wb[11]);
  axi4_top_harness #(.MEM_DEPTH(2), .SESSIONS(1)) hc (clk, rstn, fc, cc, xc,
    wc[0], wc[1], wc[2], wc[3], wc[4], wc[5], wc[6], wc[7], wc[8], wc[9], wc[10], wc[11]);
  axi4_top_harness #(.BURST_LEN(256), .NUM_BURSTS(1), .SESSIONS(1)) hd (clk, rstn, fd, cd, xd,
    wd[0], wd[1], wd[2], wd[3], wd[4], wd[5], wd[6], wd[7], wd[8], wd[9], wd[10], wd[11]);

  localparam string NAMES[12] = '{"start count 16", "AW handshake", "W beat", "WLAST", "B handshake",
    "AR handshake", "R beat", "RLAST", "BREADY after BVALID", "streamed R beat",
    "compare ok", "compare error"};

  task automatic need(string what, int unsigned n, int unsigned want_min);
    checks++;
    $display("  %-22s %0d", what, n);
    if (n < want_min) begin
      failures++;
      $display("FAIL mechanism '%s' happened %0d times", what, n);
    end
  endtask

  task automatic report();
    int unsigned sum_v;
    checks   += ca + cb + cc + cd;
    failures += xa + xb + xc + xd;
    sum_v = ha.violations() + hb.violations() + hc.violations() + hd.violations();
    checks++;
    if (sum_v != 0) begin
      failures++;
      $display("FAIL %0d handshake rule violations", sum_v);
    end
    $display("mechanisms (all configurations):");
    for (int i = 0; i < 10; i++) need(NAMES[i], wa[i] + wb[i] + wc[i] + wd[i], 1);
    need("compare ok", wa[10] + wb[10] + wc[10] + wd[10], 4);
    need("compare error", wc[11], 1);
    // start count of 16 clocks seen in every session
    checks++;
    if (wa[0] != 2 || wb[0] != 1 || wc[0] != 1 || wd[0] != 1) begin
      failures++;
      $display("FAIL start count not 16 clocks in every session");
    end
    // long bursts streamed: 15 of every 16 read beats follow one back to back
    checks++;
    if (wb[9] < 4 * 15) begin
      failures++;
      $display("FAIL burst reads did not stream: %0d", wb[9]);
    end
    // the 256-beat burst: every beat written and read, 255 of them streamed
    checks++;
    if (wd[2] != 256 || wd[6] != 256 || wd[3] != 1 || wd[7] != 1 || wd[9] < 255) begin
      failures++;
      $display("FAIL 256-beat burst: W %0d WLAST %0d R %0d RLAST %0d streamed %0d",
               wd[2], wd[3], wd[6], wd[7], wd[9]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    wait (fa && fb && fc && fd);
    repeat (5) @(posedge clk);
    report();
    $finish;
  end

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    report();
    $finish;
  end
endmodule
