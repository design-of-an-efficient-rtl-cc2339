// axi4_slave_model: behavioural AXI-4 slave used to test the master on its
// own. Not synthesizable design, a testbench model.
//
// It keeps a 256-byte memory, accepts one write burst and one read burst at
// a time, and lowers its READY and VALID signals at random (stall_pct percent
// of clocks) so the master sees back-pressure on every channel. INCR bursts
// only, one byte per beat. For error tests it can return SLVERR on write
// responses (bresp_err), SLVERR on read beats (rresp_err), or invert the
// data of one read beat of the session (corrupt_beat, counted from 0; -1 for
// none).
module axi4_slave_model
  import axi4_pkg::*;
(
  input  logic clk,
  input  logic rstn,
  input  int   stall_pct,
  input  logic bresp_err,
  input  logic rresp_err,
  input  int   corrupt_beat,
  input  logic clr_count,    // restart the beat count for corrupt_beat
  input  ax_t  aw,
  input  logic awvalid,
  output logic awready,
  input  w_t   w,
  input  logic wvalid,
  output logic wready,
  output b_t   b,
  output logic bvalid,
  input  logic bready,
  input  ax_t  ar,
  input  logic arvalid,
  output logic arready,
  output r_t   r,
  output logic rvalid,
  input  logic rready
);
  data_t mem [256];
  logic  w_open, r_open;
  ax_t   awl, arl;
  int    r_beat, r_total;

  function automatic logic go();
    return ($urandom % 100) >= stall_pct;
  endfunction

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      awready <= 0; wready <= 0; bvalid <= 0; b <= '0;
      arready <= 0; rvalid <= 0; r <= '0;
      w_open <= 0; r_open <= 0; awl <= '0; arl <= '0;
      r_beat <= 0; r_total <= 0;
    end else begin
      // write address
      awready <= !w_open && !bvalid && !(awvalid && awready) && go();
      if (awvalid && awready) begin
        w_open <= 1;
        awl    <= aw;
      end
      // write data
      wready <= w_open && !(wvalid && wready && w.last) && go();
      if (wvalid && wready) begin
        mem[awl.addr] <= w.data;
        awl.addr      <= awl.addr + 1;
        if (w.last) begin
          w_open <= 0;
          bvalid <= 1;
          b.id   <= awl.id;
          b.resp <= bresp_err ? RESP_SLVERR : RESP_OKAY;
        end
      end
      if (bvalid && bready) bvalid <= 0;
      // read address
      arready <= !r_open && !(arvalid && arready) && go();
      if (arvalid && arready) begin
        r_open <= 1;
        arl    <= ar;
        r_beat <= 0;
      end
      // read data: a beat is offered when the previous one is gone
      if (rvalid && rready) begin
        rvalid  <= 0;
        r_total <= r_total + 1;
        if (r.last) r_open <= 0;
      end
      if (r_open && r_beat <= int'(arl.len) && (!rvalid || rready) && go()) begin
        rvalid   <= 1;
        r.id     <= arl.id;
        r.data   <= ((r_total + int'(rvalid && rready)) == corrupt_beat) ?
                    ~mem[arl.addr] : mem[arl.addr];
        r.resp   <= rresp_err ? RESP_SLVERR : RESP_OKAY;
        r.last   <= (r_beat == int'(arl.len));
        arl.addr <= arl.addr + 1;
        r_beat   <= r_beat + 1;
      end
      if (clr_count) r_total <= 0;
    end
  end
endmodule
