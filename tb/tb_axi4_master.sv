// tb_axi4_master: tests the AXI-4 master against a behavioural slave with
// random stalls, in its default configuration (three single-beat bursts) and
// with four 8-beat bursts. Each rig runs five sessions, three of them with
// an injected error (bad read byte, write SLVERR, read SLVERR) that the
// master must report.
module tb_axi4_master;
  logic clk = 1'b0;
  logic rstn = 1'b0;
  always #5 clk = ~clk;

  logic fa, fb;
  int unsigned ca, cb, xa, xb, ea, eb;
  int unsigned checks = 0, failures = 0;

  axi4_master_rig ra (clk, rstn, fa, ca, xa, ea);
  axi4_master_rig #(.BURST_LEN(8), .NUM_BURSTS(4)) rb (clk, rstn, fb, cb, xb, eb);

  task automatic report();
    checks   += ca + cb + 3;
    failures += xa + xb;
    if (ra.violations() + rb.violations() != 0) begin
      failures++; $display("FAIL handshake rule violations");
    end
    if (ea != 3 || eb != 3) begin
      failures++; $display("FAIL error sessions %0d %0d, want 3 each", ea, eb);
    end
    if (!(fa && fb)) begin
      failures++; $display("FAIL sessions not finished");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rstn = 1'b1;
    wait (fa && fb);
    repeat (3) @(posedge clk);
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
