// tap_pkg: types and constants shared by the Throughput-Aware Page Hit Aware
// Write Buffer (TAP) blocks.
//
// Address map of the 1 GB FB-DIMM (30-bit byte address):
//   [1:0]   byte within a 4-byte column
//   [4:2]   column within an 8-beat burst
//   [5]     selects one bank of a bank pair; both banks of a pair are
//           accessed together so a 64-byte operation is one burst
//   [10:6]  64-byte section within a row (column bits 7:3)
//   [15:11] bank pair ("bank group"), 32 of them
//   [29:16] row, 16384 rows per bank
// The field positions follow the memory mapping used for the evaluation;
// rows are taken as bits 29:16 so that they do not overlap the bank-group
// bits and give the stated 16384 rows per bank.
// Every operation moves one 64-byte line (512 bits of data).
package tap_pkg;

  localparam int unsigned ADDR_W   = 30;
  localparam int unsigned ROW_W    = 14;
  localparam int unsigned BANK_W   = 5;
  localparam int unsigned COL_W    = 8;
  localparam int unsigned LINE_W   = ADDR_W - 6;   // 64-byte line address
  localparam int unsigned DATA_W   = 512;          // 64 bytes per operation
  localparam int unsigned N_BANKS  = 1 << BANK_W;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [BANK_W-1:0] bank_t;
  typedef logic [COL_W-1:0]  col_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [DATA_W-1:0] data_t;

  typedef enum logic {OP_READ = 1'b0, OP_WRITE = 1'b1} op_kind_e;

  // Operation after decoding: the unit that travels through the TAP.
  typedef struct packed {
    op_kind_e kind;
    bank_t    bank;
    row_t     row;
    col_t     col;
    line_t    line;
    data_t    data;
  } op_t;

  // Write buffer sizes the Adaptive Adjustor chooses from.
  typedef enum logic [1:0] {
    SZ_OFF = 2'd0,   // buffer disabled, writes go straight to the DRAM
    SZ_16  = 2'd1,
    SZ_32  = 2'd2,
    SZ_64  = 2'd3
  } wb_size_e;

  // One-cycle event strobes of the TAP, for monitoring and testing.
  typedef struct packed {
    logic read;          // read sent to the operation queue
    logic direct_write;  // write to an open row (or buffer off) sent on
    logic buffered;      // write to a closed row placed in the buffer
    logic merged;        // write overwrote a buffered write to the same line
    logic row_flush;     // buffered write issued after a row match
    logic addr_fwd;      // read served with buffered data (address match)
    logic evict;         // random buffered write issued because buffer full
    logic drain;         // buffered write issued after the buffer shrank
  } tap_events_t;

  function automatic op_t decode_addr(op_kind_e kind, addr_t a, data_t d);
    op_t o;
    o.kind = kind;
    o.row  = a[29:16];
    o.bank = a[15:11];
    o.col  = {a[10:6], a[4:2]};
    o.line = a[29:6];
    o.data = d;
    return o;
  endfunction

  // Number of enabled entries for a size code, for a buffer of n entries:
  // SZ_64 enables all of them, SZ_32 half and SZ_16 a quarter.
  function automatic int unsigned size_entries(wb_size_e s, int unsigned n);
    case (s)
      SZ_64:   return n;
      SZ_32:   return n / 2;
      SZ_16:   return n / 4;
      default: return 0;
    endcase
  endfunction

endpackage
