// axi_pkg -- shared widths, channel payload types and burst address arithmetic
// for the AXI system (masters, on-chip bus with arbiter and decoder, memory
// slaves).
//
// The widths follow the AXI3 signal list the design is built on: 4-bit IDs,
// 32-bit addresses and data, 4 write strobes, 4-bit burst length (1..16
// beats), 3-bit size, 2-bit burst type, 2-bit lock, 4-bit cache and 3-bit
// protection fields, and the write-data ID (WID) that AXI3 still carries.
// Each channel's payload is one packed struct; VALID and READY travel beside
// it as plain signals.
//
// next_beat_addr() computes the address of the following beat of a FIXED,
// INCR or WRAP burst, exactly as the AXI rules give it. The decode ranges
// (slave k owns 150 locations after slave k-1, starting with 0..150) are
// the design's memory map; everything else here is standard AXI.
package axi_pkg;

  localparam int unsigned ID_W   = 4;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;
  localparam int unsigned LEN_W  = 4;

  // Memory map: slave 0 owns addresses 0..150, slave k owns
  // 151+150*(k-1) .. 150+150*k.
  localparam int unsigned SLAVE_SPAN = 150;

  typedef logic [ID_W-1:0]   id_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [STRB_W-1:0] strb_t;
  typedef logic [LEN_W-1:0]  len_t;

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10,
    BURST_RSVD  = 2'b11
  } burst_e;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } resp_e;

  // Address and control of one burst (write or read address channel).
  typedef struct packed {
    id_t         id;
    addr_t       addr;
    len_t        len;    // beats - 1
    logic [2:0]  size;   // bytes per beat = 2**size
    burst_e      burst;
    logic [1:0]  lock;
    logic [3:0]  cache;
    logic [2:0]  prot;
  } ax_t;

  typedef struct packed {
    id_t   id;
    data_t data;
    strb_t strb;
    logic  last;
  } w_t;

  typedef struct packed {
    id_t   id;
    resp_e resp;
  } b_t;

  typedef struct packed {
    id_t   id;
    data_t data;
    resp_e resp;
    logic  last;
  } r_t;

  // Lowest address of slave k and the slave an address belongs to.
  function automatic addr_t slave_base(int unsigned k);
    return (k == 0) ? addr_t'(0) : addr_t'(SLAVE_SPAN * k + 1);
  endfunction

  function automatic addr_t slave_top(int unsigned k);
    return addr_t'(SLAVE_SPAN * (k + 1));
  endfunction

  // Address of the beat after the one at 'addr'.
  function automatic addr_t next_beat_addr(addr_t addr, logic [2:0] size,
                                           len_t len, burst_e burst);
    addr_t nbytes, aligned, wrap_bytes, low, nxt;
    nbytes     = addr_t'(1) << size;
    aligned    = addr & ~(nbytes - 1);
    wrap_bytes = nbytes * (addr_t'(len) + 1);
    low        = addr & ~(wrap_bytes - 1);
    nxt        = aligned + nbytes;
    unique case (burst)
      BURST_FIXED: return addr;
      BURST_WRAP:  return (nxt == low + wrap_bytes) ? low : nxt;
      default:     return nxt;
    endcase
  endfunction

endpackage
