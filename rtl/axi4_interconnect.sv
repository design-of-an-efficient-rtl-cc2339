// axi4_interconnect: joins the AXI-4 master to the AXI-4 slave through one
// state machine per direction.
//
// Ports named m_* face the master, ports named s_* face the slave. The
// channels pass straight through (no registers on the data path), but each
// channel is opened only in the state where it belongs:
//
//   write FSM  WR_ADDR --AW handshake--> WR_DATA --WLAST beat--> WR_RESP
//              WR_RESP --B handshake--> WR_ADDR
//   read FSM   RD_ADDR --AR handshake--> RD_DATA --RLAST beat--> RD_ADDR
//
// So at most one write burst and one read burst are in flight, write data is
// never delivered ahead of its address, and a response can only reach the
// master for a burst that was issued. While a channel is closed its VALID is
// held low towards the receiver and its READY low towards the sender.
//
// A beat counter per direction checks the burst length: a WLAST or RLAST
// that does not fall on beat AxLEN, or a burst that runs past AxLEN, sets
// the sticky proto_err output (cleared only by reset). The counter only
// checks; it adds no address decoding, as there is a single slave.
//
// The design specifies the interconnect only as a state machine that gives
// master and slave a common interface; the three-state write / two-state
// read sequencing and the length check are this design's own reading of
// that. Reset (ARESETN) is asynchronous and active low.
module axi4_interconnect
  import axi4_pkg::*;
(
  input  logic aclk,
  input  logic aresetn,
  // ---- towards the master
  input  ax_t  m_aw,
  input  logic m_awvalid,
  output logic m_awready,
  input  w_t   m_w,
  input  logic m_wvalid,
  output logic m_wready,
  output b_t   m_b,
  output logic m_bvalid,
  input  logic m_bready,
  input  ax_t  m_ar,
  input  logic m_arvalid,
  output logic m_arready,
  output r_t   m_r,
  output logic m_rvalid,
  input  logic m_rready,
  // ---- towards the slave
  output ax_t  s_aw,
  output logic s_awvalid,
  input  logic s_awready,
  output w_t   s_w,
  output logic s_wvalid,
  input  logic s_wready,
  input  b_t   s_b,
  input  logic s_bvalid,
  output logic s_bready,
  output ax_t  s_ar,
  output logic s_arvalid,
  input  logic s_arready,
  input  r_t   s_r,
  input  logic s_rvalid,
  output logic s_rready,
  // ---- status
  output logic proto_err
);

  typedef enum logic [1:0] {WR_ADDR, WR_DATA, WR_RESP} wr_state_e;
  typedef enum logic       {RD_ADDR, RD_DATA}          rd_state_e;

  wr_state_e wr_state;
  rd_state_e rd_state;
  len_t      w_len, w_cnt, r_len, r_cnt;
  logic      aw_open, w_open, b_open, ar_open, r_open;
  logic      aw_hs, w_hs, b_hs, ar_hs, r_hs;
  logic      w_bad, r_bad;

  assign aw_open = (wr_state == WR_ADDR);
  assign w_open  = (wr_state == WR_DATA);
  assign b_open  = (wr_state == WR_RESP);
  assign ar_open = (rd_state == RD_ADDR);
  assign r_open  = (rd_state == RD_DATA);

  // payloads pass through; handshakes are gated by the state
  assign s_aw      = m_aw;
  assign s_awvalid = m_awvalid && aw_open;
  assign m_awready = s_awready && aw_open;
  assign s_w       = m_w;
  assign s_wvalid  = m_wvalid && w_open;
  assign m_wready  = s_wready && w_open;
  assign m_b       = s_b;
  assign m_bvalid  = s_bvalid && b_open;
  assign s_bready  = m_bready && b_open;
  assign s_ar      = m_ar;
  assign s_arvalid = m_arvalid && ar_open;
  assign m_arready = s_arready && ar_open;
  assign m_r       = s_r;
  assign m_rvalid  = s_rvalid && r_open;
  assign s_rready  = m_rready && r_open;

  assign aw_hs = s_awvalid && s_awready;
  assign w_hs  = s_wvalid && s_wready;
  assign b_hs  = s_bvalid && s_bready;
  assign ar_hs = s_arvalid && s_arready;
  assign r_hs  = s_rvalid && s_rready;

  // a LAST on the wrong beat, or a beat past the burst length
  assign w_bad = w_hs && ((m_w.last != (w_cnt == w_len)) || (w_cnt > w_len));
  assign r_bad = r_hs && ((s_r.last != (r_cnt == r_len)) || (r_cnt > r_len));

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      wr_state  <= WR_ADDR;
      rd_state  <= RD_ADDR;
      w_len     <= '0;
      w_cnt     <= '0;
      r_len     <= '0;
      r_cnt     <= '0;
      proto_err <= 1'b0;
    end else begin
      unique case (wr_state)
        WR_ADDR: if (aw_hs) begin
          wr_state <= WR_DATA;
          w_len    <= m_aw.len;
          w_cnt    <= '0;
        end
        WR_DATA: if (w_hs) begin
          w_cnt <= w_cnt + 8'd1;
          if (m_w.last) wr_state <= WR_RESP;
        end
        WR_RESP: if (b_hs) wr_state <= WR_ADDR;
        default: wr_state <= WR_ADDR;
      endcase
      unique case (rd_state)
        RD_ADDR: if (ar_hs) begin
          rd_state <= RD_DATA;
          r_len    <= m_ar.len;
          r_cnt    <= '0;
        end
        RD_DATA: if (r_hs) begin
          r_cnt <= r_cnt + 8'd1;
          if (s_r.last) rd_state <= RD_ADDR;
        end
        default: rd_state <= RD_ADDR;
      endcase
      if (w_bad || r_bad) proto_err <= 1'b1;
    end
  end

endmodule
