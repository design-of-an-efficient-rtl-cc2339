// axi4_slave: AXI-4 burst slave backed by a 256 x 8 block RAM.
//
// Two flags decide which kind of transaction owns the slave: flagw is set
// when a write address is accepted and cleared by the last write beat; flagr
// is set when a read address is accepted and cleared by the last read beat.
// A new address (write or read) is accepted only while both flags are clear
// and no write response is still waiting, so the slave serves one burst at a
// time; when a write and a read address arrive together the write goes first.
//
// Write path: AWREADY is a one-cycle pulse that latches address, length,
// size, burst type and ID. WREADY rises once flagw is set and stays high until
// the beat with WLAST; every accepted beat writes the RAM at the current
// address (when its strobe bit is set) and steps the address by the burst
// rule (FIXED, INCR, or WRAP at the (len+1)*size boundary). The beat with
// WLAST raises BVALID with BRESP=OKAY and BID=AWID; it drops when BREADY is
// seen.
//
// Read path: ARREADY is a one-cycle pulse that latches the read burst. RVALID
// rises the cycle after the address handshake and stays high for the whole
// burst, one beat per clock while RREADY is high. The RAM read address is
// steered one cycle ahead (to the next beat address on each accepted beat),
// so the RAM's registered output is always the data of the current beat.
// RLAST marks beat ARLEN; RRESP=OKAY and RID=ARID.
//
// The flag scheme, the one-cycle ready pulses and the OKAY responses follow
// the design; write priority, holding off new addresses while BVALID is
// pending and the one-beat-per-clock read path are this design's own choices.
// Only ID, address, length, size and burst type are latched; the lock,
// cache, protection and QoS attributes do not change what a memory does, so
// the slave accepts and ignores them (lint reports those inputs as unused).
// Reset (ARESETN) is asynchronous and active low.
module axi4_slave
  import axi4_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 256
) (
  input  logic aclk,
  input  logic aresetn,
  // write address channel
  input  ax_t  aw,
  input  logic awvalid,
  output logic awready,
  // write data channel
  input  w_t   w,
  input  logic wvalid,
  output logic wready,
  // write response channel
  output b_t   b,
  output logic bvalid,
  input  logic bready,
  // read address channel
  input  ax_t  ar,
  input  logic arvalid,
  output logic arready,
  // read data channel
  output r_t   r,
  output logic rvalid,
  input  logic rready
);

  localparam int unsigned MAW = $clog2(MEM_DEPTH);

  // the part of an address-channel payload the slave acts on
  typedef struct packed {
    id_t    id;
    addr_t  addr;
    len_t   len;
    size_t  size;
    burst_e burst;
  } burst_t;

  logic   flagw, flagr;
  burst_t awl, arl;          // latched burst descriptions; addr field advances
  len_t   r_cnt;             // read beats already delivered
  logic   aw_accept, ar_accept, wnext, rnext, rlast;
  addr_t  ar_next;
  addr_t  bram_raddr;
  data_t  bram_rdata;

  assign aw_accept = !awready && awvalid && !flagw && !flagr && !bvalid;
  assign ar_accept = !arready && arvalid && !flagw && !flagr && !aw_accept;
  assign wnext     = wready && wvalid;
  assign rnext     = rvalid && rready;
  assign rlast     = (r_cnt == arl.len);
  assign ar_next   = next_beat_addr(arl.addr, arl.len, arl.size, arl.burst);

  // ---------------- write address, write ready, write response -------------
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      awready <= 1'b0;
      flagw   <= 1'b0;
      awl     <= '0;
      wready  <= 1'b0;
      bvalid  <= 1'b0;
      b       <= '0;
    end else begin
      // AWREADY: one-cycle pulse, flagw marks a write burst in progress
      if (aw_accept) begin
        awready <= 1'b1;
        flagw   <= 1'b1;
        awl     <= '{id: aw.id, addr: aw.addr, len: aw.len, size: aw.size, burst: aw.burst};
      end else begin
        awready <= 1'b0;
        if (wnext && w.last) flagw <= 1'b0;
      end
      // address of the next beat
      if (wnext)
        awl.addr <= next_beat_addr(awl.addr, awl.len, awl.size, awl.burst);
      // WREADY: high from the start of the burst until WLAST is taken
      if (!wready && wvalid && flagw)
        wready <= 1'b1;
      else if (wnext && w.last)
        wready <= 1'b0;
      // write response after the last beat
      if (wnext && w.last && !bvalid) begin
        bvalid <= 1'b1;
        b.id   <= awl.id;
        b.resp <= RESP_OKAY;
      end else if (bvalid && bready) begin
        bvalid <= 1'b0;
      end
    end
  end

  // ---------------- read address and read data ------------------------------
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      arready <= 1'b0;
      flagr   <= 1'b0;
      arl     <= '0;
      r_cnt   <= '0;
      rvalid  <= 1'b0;
    end else begin
      if (ar_accept) begin
        arready <= 1'b1;
        flagr   <= 1'b1;
        arl     <= '{id: ar.id, addr: ar.addr, len: ar.len, size: ar.size, burst: ar.burst};
        r_cnt   <= '0;
      end else begin
        arready <= 1'b0;
        if (rnext && rlast) flagr <= 1'b0;
      end
      // data may only follow the completed address handshake
      if (arready && arvalid)
        rvalid <= 1'b1;
      else if (rnext && rlast)
        rvalid <= 1'b0;
      if (rnext) begin
        arl.addr <= ar_next;
        r_cnt    <= r_cnt + 8'd1;
      end
    end
  end

  // RAM read address runs one cycle ahead of the beat being presented
  always_comb begin
    if (ar_accept)  bram_raddr = ar.addr;
    else if (rnext) bram_raddr = ar_next;
    else            bram_raddr = arl.addr;
  end

  assign r.id   = arl.id;
  assign r.data = bram_rdata;
  assign r.resp = RESP_OKAY;
  assign r.last = rlast;

  axi4_bram #(.DEPTH(MEM_DEPTH), .DATA_W(DATA_W)) u_bram (
    .clk   (aclk),
    .we    (wnext && w.strb[0]),
    .waddr (awl.addr[MAW-1:0]),
    .wdata (w.data),
    .raddr (bram_raddr[MAW-1:0]),
    .rdata (bram_rdata)
  );

endmodule
