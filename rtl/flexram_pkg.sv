// flexram_pkg: types and constants shared by the FlexRAM chip.
// The sizes follow the FlexRAM organisation: 1-Mbyte banks reached through a
// 128-bit data path (128 DRAM data lines per bank), 16-bit P.Array
// instructions, 4-Kbyte pages (page size is this design's own choice).
// Request/response structs carry a bank access; handshakes are valid/ready for
// requests and a one-cycle valid pulse for responses.
package flexram_pkg;

  localparam int unsigned BANK_AW   = 20;   // byte address inside a 1-Mbyte bank
  localparam int unsigned DL_W      = 128;  // DRAM data lines per bank
  localparam int unsigned DL_BE     = DL_W / 8;
  localparam int unsigned PAGE_BITS = 12;   // 4-Kbyte pages
  localparam int unsigned VPN_W     = 32 - PAGE_BITS;
  localparam int unsigned PPN_W     = 2 + BANK_AW - PAGE_BITS;  // target + page in bank
  localparam int unsigned IADDR_W   = 12;   // 4096 instructions = 8 Kbyte

  // Which of the three banks a P.Array can see
  typedef enum logic [1:0] {TGT_OWN = 2'd0, TGT_LEFT = 2'd1, TGT_RIGHT = 2'd2} tgt_e;

  // Sources at a bank switch
  localparam int unsigned SRC_GBUS = 0;  // P.Host, local or remote P.Mem
  localparam int unsigned SRC_LOC  = 1;  // the bank's own P.Array
  localparam int unsigned SRC_LPA  = 2;  // P.Array on the left (index - 1)
  localparam int unsigned SRC_RPA  = 3;  // P.Array on the right (index + 1)
  localparam int unsigned NSRC     = 4;

  typedef struct packed {
    logic                we;
    logic [BANK_AW-1:0]  addr;   // byte address, bits [3:0] select the byte lane
    logic [DL_W-1:0]     wdata;
    logic [DL_BE-1:0]    be;
  } bank_req_t;

  typedef struct packed {
    logic [DL_W-1:0] rdata;
    logic            hit;        // the access hit in a row buffer
  } bank_rsp_t;

  // A P.Array request carries the bank it goes to
  typedef struct packed {
    tgt_e       tgt;
    bank_req_t  req;
  } pa_req_t;

  // 32-bit word request used by the P.Host and the P.Mem
  typedef struct packed {
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
    logic [3:0]  be;
  } word_req_t;

  // P.Array instruction set: 28 16-bit instructions.
  // [15:11] opcode, [10:7] field A (rd / tested register), [6:3] field B (rs),
  // [2:0] off3, or [6:0] imm7, or [10:0] off11.
  typedef enum logic [4:0] {
    OP_HALT = 5'd0,  OP_ADD  = 5'd1,  OP_SUB  = 5'd2,  OP_AND  = 5'd3,
    OP_OR   = 5'd4,  OP_XOR  = 5'd5,  OP_SLL  = 5'd6,  OP_SRL  = 5'd7,
    OP_SRA  = 5'd8,  OP_SLT  = 5'd9,  OP_MOV  = 5'd10, OP_MUL  = 5'd11,
    OP_ADDI = 5'd12, OP_LI   = 5'd13, OP_ORI  = 5'd14, OP_SLLI = 5'd15,
    OP_LW   = 5'd16, OP_SW   = 5'd17, OP_LB   = 5'd18, OP_SB   = 5'd19,
    OP_BEQZ = 5'd20, OP_BNEZ = 5'd21, OP_J    = 5'd22, OP_JAL  = 5'd23,
    OP_JR   = 5'd24, OP_BCR  = 5'd25, OP_BCF  = 5'd26, OP_NTF  = 5'd27
  } pa_op_e;

  // Inter-chip message header: [31:24] dest chip, [23:16] source chip,
  // [15:8] payload length in words, [7:0] message type.
  typedef struct packed {
    logic [7:0] dest;
    logic [7:0] src;
    logic [7:0] len;
    logic [7:0] mtype;
  } net_hdr_t;

endpackage
