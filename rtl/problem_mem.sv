// problem_mem: the read-only data of a spectrum-allocation instance, as one
// PE needs it.
//
// Three tables, one row per secondary user n:
//   L row n : MMAX bits, bit m set when channel m is free for user n (l(n,m))
//   C row n : MMAX*NMAX bits; the NMAX-bit field m holds, for every user k,
//             c(n,k,m): users n and k interfere on channel m
//   B row n : MMAX rewards of BW bits, field m is b(n,m)
// All three rows of one user are read together, one cycle after rd_n is
// presented, so the PE can repair and score one row of a solution per cycle.
// Rows are written DW bits at a time (wr_word w selects bits w*DW and up)
// over the command network during set-up. Rows are cleared at reset.
// The document places such read-only data beside the solutions; keeping a
// private copy per PE, and the row layout, are this design's choices.
module problem_mem
  import cgap_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // write side (set-up)
  input  logic             wr_en,
  input  logic [1:0]       wr_table,     // REG_L, REG_C or REG_B
  input  logic [NIW-1:0]   wr_n,
  input  logic [7:0]       wr_word,
  input  logic [DW-1:0]    wr_data,
  // read side
  input  logic [NIW-1:0]   rd_n,
  output logic [MMAX-1:0]      l_row,
  output logic [MMAX*NMAX-1:0] c_row,
  output logic [MMAX*BW-1:0]   b_row
);

  localparam int LWORDS = (MMAX + DW - 1) / DW;
  localparam int CWORDS = (MMAX * NMAX + DW - 1) / DW;
  localparam int BWORDS = (MMAX * BW + DW - 1) / DW;

  logic [LWORDS*DW-1:0] l_mem [NMAX];
  logic [CWORDS*DW-1:0] c_mem [NMAX];
  logic [BWORDS*DW-1:0] b_mem [NMAX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NMAX; i++) begin
        l_mem[i] <= '0;
        c_mem[i] <= '0;
        b_mem[i] <= '0;
      end
    end else if (wr_en) begin
      case (wr_table)
        REG_L: if (int'(wr_word) < LWORDS) l_mem[wr_n][wr_word*DW +: DW] <= wr_data;
        REG_C: if (int'(wr_word) < CWORDS) c_mem[wr_n][wr_word*DW +: DW] <= wr_data;
        REG_B: if (int'(wr_word) < BWORDS) b_mem[wr_n][wr_word*DW +: DW] <= wr_data;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    l_row <= l_mem[rd_n][MMAX-1:0];
    c_row <= c_mem[rd_n][MMAX*NMAX-1:0];
    b_row <= b_mem[rd_n][MMAX*BW-1:0];
  end

endmodule
