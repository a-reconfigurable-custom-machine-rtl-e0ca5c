// cgap_pkg: sizes, structs and command map shared by the cellular genetic
// algorithm processor (cGAP).
//
// The array is sized for spectrum-allocation instances of up to 32 secondary
// users (NMAX) and 32 channels (MMAX), the largest instance the machine is
// built for. A solution is the binary channel-assignment matrix A, kept as
// NMAX rows of MMAX bits (row n = channels given to user n) plus its fitness.
// The per-spMEM capacity (SOLS_MAX), reward and fitness widths, the random
// word width and the command map are this design's own choices.
package cgap_pkg;

  // ---- problem and population sizes -------------------------------------
  localparam int NMAX     = 32;               // secondary users per instance
  localparam int MMAX     = 32;               // channels per instance
  localparam int SOLS_MAX = 4;                // solutions per spMEM
  localparam int BW       = 8;                // width of one reward b(n,m)
  localparam int FW       = 32;               // fitness (sum of rewards)
  localparam int MUT_K    = 5;                // flip prob. per bit = 2^-MUT_K
  localparam int RW       = MUT_K * MMAX;     // random bits per cycle per PE
  localparam int DW       = 32;               // command/host data width

  localparam int NIW = $clog2(NMAX);          // user (row) index width
  localparam int MIW = $clog2(MMAX + 1);      // channel count width
  localparam int SW  = (SOLS_MAX > 1) ? $clog2(SOLS_MAX) : 1;  // slot index

  // ---- spMEM port (one per PE side) --------------------------------------
  typedef struct packed {
    logic            lock;      // hold / ask for the lock of `slot`
    logic [SW-1:0]   slot;      // solution slot inside the spMEM
    logic            rd;        // read row `row` and the fitness of `slot`
    logic            we_row;    // write wrow to row `row` of `slot`
    logic            we_fit;    // write wfit as the fitness of `slot`
    logic [NIW-1:0]  row;
    logic [MMAX-1:0] wrow;
    logic [FW-1:0]   wfit;
  } spmem_req_t;

  typedef struct packed {
    logic            gnt;       // lock of the requested slot is held
    logic [MMAX-1:0] rrow;      // row read one cycle after rd
    logic [FW-1:0]   rfit;      // fitness read one cycle after rd
  } spmem_rsp_t;

  localparam spmem_req_t SPMEM_REQ_IDLE = '0;

  // ---- command ring between the cGAC and the PEs --------------------------
  typedef enum logic [1:0] {OP_NOP = 2'd0, OP_WR = 2'd1, OP_RD = 2'd2} cmd_op_e;

  localparam logic [7:0] DEST_ALL = 8'hFF;    // broadcast address

  typedef struct packed {
    logic          valid;
    logic          ack;       // set by the addressed node(s)
    logic [7:0]    dest;      // PE index or DEST_ALL
    cmd_op_e       op;
    logic [15:0]   addr;
    logic [DW-1:0] data;      // write data, or read data on return
  } ring_pkt_t;

  // PE address map: addr[15:14] region, addr[13:8] user n, addr[7:0] word w
  localparam logic [1:0] REG_CFG  = 2'd0;     // registers, below
  localparam logic [1:0] REG_L    = 2'd1;     // write: L row n, read: best row n
  localparam logic [1:0] REG_C    = 2'd2;     // write: C row n (conflict vectors)
  localparam logic [1:0] REG_B    = 2'd3;     // write: B row n (rewards)

  // registers of region REG_CFG (addr[3:0])
  localparam logic [3:0] R_NUSERS = 4'd0;     // RW: N of the instance
  localparam logic [3:0] R_NCHAN  = 4'd1;     // RW: M of the instance
  localparam logic [3:0] R_NSOLS  = 4'd2;     // RW: solutions used per spMEM
  localparam logic [3:0] R_CTRL   = 4'd3;     // W: 1 init, 2 run, 3 stop
  localparam logic [3:0] R_STATUS = 4'd4;     // R: {.., running, busy}
  localparam logic [3:0] R_GENS   = 4'd5;     // R: solutions generated
  localparam logic [3:0] R_BEST   = 4'd6;     // R: best fitness produced
  localparam logic [3:0] R_COLL   = 4'd7;     // R: cycles stalled on a lock
  localparam logic [3:0] R_REPL   = 4'd8;     // R: replacements made

  localparam logic [DW-1:0] CTRL_INIT = 1;
  localparam logic [DW-1:0] CTRL_RUN  = 2;
  localparam logic [DW-1:0] CTRL_STOP = 3;

  function automatic logic [15:0] pe_addr(logic [1:0] region, logic [5:0] n,
                                          logic [7:0] w);
    return {region, n, w};
  endfunction

endpackage
