// Types and constants shared by the cell-site vault hardware: the secure
// memory bus, the DRAM word interface and the register bus of the vault.
//
// Widths that come from the encrypted-memory block diagram: 32-bit addresses,
// 256-bit data blocks between the bus interface and the cipher, 288-bit cipher
// blocks (256 data + 32 address) towards the DRAM controller, and 40-bit words
// off chip (32 data bits, 7 ECC bits, one bit unused). The bus and register
// structures themselves are this design's own choice.
package vault_pkg;

  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned LINE_BYTES  = 32;                 // one encryption block
  localparam int unsigned LINE_W      = 8 * LINE_BYTES;     // 256
  localparam int unsigned BLOCK_W     = LINE_W + ADDR_W;    // 288
  localparam int unsigned NB          = BLOCK_W / 32;       // 9 Rijndael columns
  localparam int unsigned NK          = 8;                  // 256-bit keys
  localparam int unsigned WORDS_PER_BLOCK = NB;             // 9 DRAM words per block
  localparam int unsigned ECC_W       = 7;
  localparam int unsigned DRAM_W      = 40;
  localparam int unsigned TAG_W       = ADDR_W - 5;         // 256-bit block index
  localparam int unsigned MASTER_KEY_W = 256;

  // Request on the secure memory port. Writes carry a byte enable for each of
  // the 32 bytes of the addressed block; reads use it to say which bytes they
  // need. secure is the processor security state that travels with the access.
  typedef struct packed {
    logic              write;
    logic              secure;
    logic [ADDR_W-1:0] addr;
    logic [LINE_BYTES-1:0] be;
    logic [LINE_W-1:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic              err;
    logic [LINE_W-1:0] rdata;
  } mem_rsp_t;

  // One 40-bit word access to the off-chip memory.
  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DRAM_W-1:0] wdata;
  } dram_cmd_t;

  // Register bus of the vault's control registers.
  typedef struct packed {
    logic        write;
    logic        secure;
    logic [7:0]  addr;
    logic [31:0] wdata;
  } reg_req_t;

  typedef struct packed {
    logic        err;
    logic [31:0] rdata;
  } reg_rsp_t;

  // Register offsets (bytes).
  localparam logic [7:0] REG_STATUS    = 8'h00;
  localparam logic [7:0] REG_CONTROL   = 8'h04;
  localparam logic [7:0] REG_KEYLOAD   = 8'h08;
  localparam logic [7:0] REG_BOUNDARY  = 8'h0c;
  localparam logic [7:0] REG_KEYDATA   = 8'h10;   // 8 words, 0x10..0x2c
  localparam logic [7:0] REG_ECC_CORR  = 8'h30;
  localparam logic [7:0] REG_FAILS     = 8'h34;
  localparam logic [7:0] REG_FUSE_BURN = 8'h38;
  localparam logic [7:0] REG_MASTER    = 8'h40;   // 8 words, 0x40..0x5c

  // CONTROL register bits.
  localparam int unsigned CTL_THROW_SWITCH = 0;
  localparam int unsigned CTL_CLEAR_FLAGS  = 1;
  localparam int unsigned CTL_START_MUTATE = 2;

endpackage
