// pim_pkg: types and constants shared by the in-memory sequence alignment
// accelerator.
//
// The accelerator sits in the logic layer of an HMC-like 3D DRAM stack. Each
// of the 32 vaults holds a PIM queue, a memory queue, a scheduler and two
// processing elements (PEs). A PE is an address generation unit (AGU) plus a
// one-cycle Needleman-Wunsch datapath. The numbers below that come from the
// design description are: 32-bit memory words, 32-bit DP cells, 2-bit DNA
// characters (16 per word), 32 vaults, 4 links, 2 PEs per vault and an
// address queue of 10 entries. Field widths of packets, tags and the
// direction encoding are this implementation's own choices.
package pim_pkg;

  // Memory word and data widths.
  localparam int unsigned WORD_W         = 32;  // one vault access returns 32 bits
  localparam int unsigned ADDR_W         = 32;  // byte address, 4 GB stack
  localparam int unsigned LEN_W          = 32;  // sequence length field of a task
  localparam int unsigned DP_W           = 32;  // one DP matrix cell
  localparam int unsigned CHAR_W         = 2;   // one DNA character
  localparam int unsigned CHARS_PER_WORD = WORD_W / CHAR_W;  // 16
  localparam int unsigned DIR_W          = 2;   // one direction matrix cell
  localparam int unsigned DIRS_PER_WORD  = WORD_W / DIR_W;   // 16
  localparam int unsigned WORD_BYTES     = WORD_W / 8;

  // Stack organisation.
  localparam int unsigned VAULT_W = 5;   // up to 32 vaults
  localparam int unsigned LINK_W  = 2;   // up to 4 host links
  localparam int unsigned HTAG_W  = 8;   // host transaction tag
  localparam int unsigned SRC_W   = 4;   // requester inside a vault (PEs + memory queue)

  // Direction matrix encoding: where the maximum of Eq. (1) came from.
  typedef enum logic [DIR_W-1:0] {
    DIR_DIAG  = 2'd0,   // DP(i-1,j-1) + T(i,j)
    DIR_NORTH = 2'd1,   // DP(i-1,j)   + gap
    DIR_WEST  = 2'd2    // DP(i,j-1)   + gap
  } dir_e;

  // Host packet commands.
  typedef enum logic [1:0] {
    CMD_RD  = 2'd0,
    CMD_WR  = 2'd1,
    CMD_PIM = 2'd2
  } cmd_e;

  // Contents of a PIM alignment packet: the six AGU programming values.
  typedef struct packed {
    logic [ADDR_W-1:0] addr_a;    // query sequence A (rows)
    logic [ADDR_W-1:0] addr_b;    // reference sequence B (columns)
    logic [ADDR_W-1:0] addr_dp;   // DP matrix, row-major, one word per cell
    logic [ADDR_W-1:0] addr_dir;  // direction matrix, row-major, 16 cells per word
    logic [LEN_W-1:0]  len_a;
    logic [LEN_W-1:0]  len_b;
  } pim_task_t;

  // A request packet as it leaves a link controller.
  typedef struct packed {
    cmd_e               cmd;
    logic [VAULT_W-1:0] vault;
    logic [LINK_W-1:0]  link;    // link the request arrived on (for the reply)
    logic [HTAG_W-1:0]  tag;
    logic [ADDR_W-1:0]  addr;
    logic [WORD_W-1:0]  wdata;
    pim_task_t          pim;     // AGU programming data of a PIM packet
  } host_req_t;

  // A read reply travelling back to a link.
  typedef struct packed {
    logic [VAULT_W-1:0] vault;
    logic [LINK_W-1:0]  link;
    logic [HTAG_W-1:0]  tag;
    logic [WORD_W-1:0]  rdata;
  } host_resp_t;

  // Host read/write held in a vault's memory queue.
  typedef struct packed {
    logic               we;
    logic [LINK_W-1:0]  link;
    logic [HTAG_W-1:0]  tag;
    logic [ADDR_W-1:0]  addr;
    logic [WORD_W-1:0]  wdata;
  } mem_req_t;

  // Entry of a PE's address queue; write data sits in the store queue.
  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
  } pe_req_t;

  // Tag carried through the vault controller so that read data finds its
  // requester again.
  typedef struct packed {
    logic [SRC_W-1:0]  src;   // PE index, or N_PE for the memory queue
    logic [LINK_W-1:0] link;
    logic [HTAG_W-1:0] htag;
  } vc_tag_t;

  // Request from the vault logic to the vault controller.
  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [WORD_W-1:0] wdata;
    vc_tag_t           tag;
  } vc_req_t;

  // Read data from the vault controller.
  typedef struct packed {
    logic [WORD_W-1:0] rdata;
    vc_tag_t           tag;
  } vc_resp_t;

endpackage
