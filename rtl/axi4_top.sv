// axi4_top: complete AXI-4 master - interconnect - slave system.
//
// The master writes NUM_BURSTS bursts of BURST_LEN bytes into the slave's
// 256 x 8 block RAM through the interconnect, reads them back and compares.
// With the defaults this is the demonstration session of the design: after
// a 16-clock start count, three single-beat INCR writes place 10, 20 and 30
// at consecutive addresses starting at 8'h81, then three single-beat reads
// return them and c_done rises with error low.
//
// Interface: aclk, asynchronous active-low aresetn, and init_txn, which
// starts a session whenever the master is idle (tie it high to repeat
// sessions back to back). The master's status and the interconnect's
// protocol-error flag are brought out; the AXI channels stay inside.
//
// Timing with the defaults: the first AWVALID comes 17 clocks after the
// session starts; each single-beat write burst then occupies 7 clocks
// (AWVALID to the next AWVALID) and each single-beat read burst 5 clocks,
// so a whole session takes 55 clocks from init_txn to c_done. A burst of N
// beats takes about N+6 clocks to write and N+4 to read back.
module axi4_top
  import axi4_pkg::*;
#(
  parameter addr_t       BASE_ADDR    = 8'h80,
  parameter int unsigned START_COUNT  = 16,
  parameter int unsigned BURST_LEN    = 1,
  parameter int unsigned NUM_BURSTS   = 3,
  parameter addr_t       FIRST_OFFSET = 8'd1,
  parameter data_t       DATA_STEP    = 8'd10,
  parameter int unsigned MEM_DEPTH    = 256
) (
  input  logic       aclk,
  input  logic       aresetn,
  input  logic       init_txn,
  output logic       busy,
  output logic       writes_done,
  output logic       reads_done,
  output logic       c_done,
  output logic       error,
  output data_t      err_data,
  output logic [2:0] err_kind,
  output logic       proto_err
);

  // master side of the interconnect
  ax_t  m_aw, m_ar;
  w_t   m_w;
  b_t   m_b;
  r_t   m_r;
  logic m_awvalid, m_awready, m_wvalid, m_wready, m_bvalid, m_bready;
  logic m_arvalid, m_arready, m_rvalid, m_rready;
  // slave side of the interconnect
  ax_t  s_aw, s_ar;
  w_t   s_w;
  b_t   s_b;
  r_t   s_r;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;

  axi4_master #(
    .BASE_ADDR   (BASE_ADDR),
    .START_COUNT (START_COUNT),
    .BURST_LEN   (BURST_LEN),
    .NUM_BURSTS  (NUM_BURSTS),
    .FIRST_OFFSET(FIRST_OFFSET),
    .DATA_STEP   (DATA_STEP)
  ) u_master (
    .aclk, .aresetn, .init_txn,
    .aw(m_aw), .awvalid(m_awvalid), .awready(m_awready),
    .w (m_w),  .wvalid (m_wvalid),  .wready (m_wready),
    .b (m_b),  .bvalid (m_bvalid),  .bready (m_bready),
    .ar(m_ar), .arvalid(m_arvalid), .arready(m_arready),
    .r (m_r),  .rvalid (m_rvalid),  .rready (m_rready),
    .busy, .writes_done, .reads_done, .c_done, .error, .err_data, .err_kind
  );

  axi4_interconnect u_interconnect (
    .aclk, .aresetn,
    .m_aw, .m_awvalid, .m_awready, .m_w, .m_wvalid, .m_wready,
    .m_b, .m_bvalid, .m_bready, .m_ar, .m_arvalid, .m_arready,
    .m_r, .m_rvalid, .m_rready,
    .s_aw, .s_awvalid, .s_awready, .s_w, .s_wvalid, .s_wready,
    .s_b, .s_bvalid, .s_bready, .s_ar, .s_arvalid, .s_arready,
    .s_r, .s_rvalid, .s_rready,
    .proto_err
  );

  axi4_slave #(.MEM_DEPTH(MEM_DEPTH)) u_slave (
    .aclk, .aresetn,
    .aw(s_aw), .awvalid(s_awvalid), .awready(s_awready),
    .w (s_w),  .wvalid (s_wvalid),  .wready (s_wready),
    .b (s_b),  .bvalid (s_bvalid),  .bready (s_bready),
    .ar(s_ar), .arvalid(s_arvalid), .arready(s_arready),
    .r (s_r),  .rvalid (s_rvalid),  .rready (s_rready)
  );

endmodule
