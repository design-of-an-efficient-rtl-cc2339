// tb_axi4_bram: random test of the 256 x 8 block RAM.
//
// Fills every location, then runs random simultaneous writes and reads
// against a reference array. Checks the one-clock read latency (rdata
// follows raddr by exactly one clock) and the read-before-write result when
// both ports hit one address in the same clock.
module tb_axi4_bram;
  localparam int DEPTH = 256;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       we;
  logic [7:0] waddr, wdata, raddr, rdata;
  logic [7:0] ref_mem [DEPTH];
  logic [7:0] want;
  int unsigned checks = 0, failures = 0;

  axi4_bram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = 8'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    // read back every location, one per clock
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 8'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("FAIL fill read %0d: %h want %h", a, rdata, ref_mem[a]);
      end
      @(negedge clk);
    end
    // random traffic on both ports
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 8'($urandom);
      wdata = 8'($urandom);
      raddr = ($urandom % 4 == 0) ? waddr : 8'($urandom);
      want  = ref_mem[raddr];              // old value: read before write
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
      checks++;
      if (rdata !== want) begin
        failures++;
        $display("FAIL random read %0d: %h want %h", raddr, rdata, want);
      end
    end
    finish_tb();
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish_tb();
  end
endmodule
