// sec_pkg: types and constants shared by the security module and its three
// processor wrappers.
//
// The general-purpose processor (GPP) never sees a key. It controls the
// security module through the control bus, with a command word that names an
// operation and the *addresses* of the keys to use, and exchanges 32-bit words
// of data and enciphered session keys over the data bus. The command word
// layout is the same for all three wrappers (custom instruction, FSL, AHB):
//
//   [3:0]   op       operation (op_e)
//   [5:4]   widx     word index within the 128-bit data block (WR/RD_DATA)
//   [9:8]   sk_addr  session-key register address
//   [13:12] mk_addr  master-key register address
//
// The encoding, the 32-bit word width of the data bus and the operation set
// are choices of this design; the document gives only the principle (hidden
// keys managed by address, a two-level key hierarchy, three internal buses).
package sec_pkg;

  localparam int unsigned WORD_W    = 32;   // GPP data bus width
  localparam int unsigned BLOCK_W   = 128;  // AES block and key width
  localparam int unsigned KADDR_W   = 2;    // key address field width
  localparam int unsigned MAX_KEYS  = 1 << KADDR_W;

  typedef enum logic [3:0] {
    OP_NOP         = 4'h0,  // no operation, returns status word
    OP_WR_DATA     = 4'h1,  // data bus word -> data input register[widx]
    OP_RD_DATA     = 4'h2,  // data output register[widx] -> data bus
    OP_ENC_DATA    = 4'h3,  // data input encrypted with session key sk_addr
    OP_DEC_DATA    = 4'h4,  // data input decrypted with session key sk_addr
    OP_LOAD_SKEY   = 4'h5,  // data input (enciphered session key) decrypted
                            // with master key mk_addr into session key sk_addr
    OP_EXPORT_SKEY = 4'h6,  // session key sk_addr encrypted with master key
                            // mk_addr into the data output register
    OP_STATUS      = 4'h7   // returns key-valid flags
  } op_e;

  typedef struct packed {
    logic [17:0]        rsvd;
    logic [KADDR_W-1:0] mk_addr;
    logic [1:0]         rsvd1;
    logic [KADDR_W-1:0] sk_addr;
    logic [1:0]         rsvd0;
    logic [1:0]         widx;
    op_e                op;
  } cmd_t;

  // Response word of a command that does not read data: bit 0 is the error
  // flag (refused key use or unknown operation).
  localparam logic [WORD_W-1:0] RSP_OK  = 32'h0000_0000;
  localparam logic [WORD_W-1:0] RSP_ERR = 32'h0000_0001;

  function automatic cmd_t make_cmd(op_e op, logic [1:0] widx, logic [KADDR_W-1:0] sk,
                                    logic [KADDR_W-1:0] mk);
    cmd_t c;
    c         = '0;
    c.op      = op;
    c.widx    = widx;
    c.sk_addr = sk;
    c.mk_addr = mk;
    return c;
  endfunction

endpackage
