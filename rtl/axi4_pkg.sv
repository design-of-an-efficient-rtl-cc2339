// axi4_pkg: types and constants shared by the AXI-4 master, interconnect,
// slave and block RAM.
//
// The bus is 8 bits wide for both data and address, as in the design this
// RTL implements: one byte per beat, 256 addressable bytes. Each of the five
// AXI-4 channels (write address, write data, write response, read address,
// read data) is carried as one packed payload struct plus a separate
// valid/ready pair, so modules can be wired with plain ports.
//
// The transaction ID width (1 bit) is this design's own choice; the rest of
// the encodings (burst types, responses, cache attribute 4'b0011) follow the
// AMBA AXI-4 conventions the design is built on.
package axi4_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned ADDR_W = 8;
  localparam int unsigned ID_W   = 1;
  localparam int unsigned STRB_W = DATA_W / 8;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [ID_W-1:0]   id_t;
  typedef logic [STRB_W-1:0] strb_t;
  typedef logic [7:0]        len_t;   // beats - 1, up to 256-beat bursts
  typedef logic [2:0]        size_t;  // log2(bytes per beat)

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } burst_e;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } resp_e;

  // Bufferable and cacheable ("normal non-cacheable bufferable" in AXI-4 terms)
  localparam logic [3:0] CACHE_BUF_MOD = 4'b0011;

  // Write address / read address channel payload
  typedef struct packed {
    id_t        id;
    addr_t      addr;
    len_t       len;
    size_t      size;
    burst_e     burst;
    logic       lock;
    logic [3:0] cache;
    logic [2:0] prot;
    logic [3:0] qos;
  } ax_t;

  // Write data channel payload
  typedef struct packed {
    data_t data;
    strb_t strb;
    logic  last;
  } w_t;

  // Write response channel payload
  typedef struct packed {
    id_t   id;
    resp_e resp;
  } b_t;

  // Read data channel payload
  typedef struct packed {
    id_t   id;
    data_t data;
    resp_e resp;
    logic  last;
  } r_t;

  // Address of the next beat of a burst (AXI-4 rules for FIXED, INCR, WRAP).
  // Addresses never leave the 8-bit space: an INCR burst rolls over at 256.
  function automatic addr_t next_beat_addr(addr_t addr, len_t len, size_t size,
                                           burst_e burst);
    addr_t step;
    addr_t wrap_mask;
    step      = addr_t'(1) << size;
    // Wrap boundary = (len+1) * bytes per beat; len is 1, 3, 7 or 15 for WRAP
    wrap_mask = addr_t'((({1'b0, len} + 9'd1) << size) - 9'd1);
    unique case (burst)
      BURST_FIXED: next_beat_addr = addr;
      BURST_WRAP:  next_beat_addr = (addr & ~wrap_mask) | ((addr + step) & wrap_mask);
      default:     next_beat_addr = addr + step;
    endcase
  endfunction

endpackage
