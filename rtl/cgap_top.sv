// cgap_top: the cellular genetic algorithm processor (cGAP).
//
// A ROWS x COLS array of processing elements (pe) with a subpopulation
// memory (spmem) on each of the four sides of every PE. Each interior spMEM
// is shared by the two PEs on either side of it; the spMEMs on the outer
// edge of the array belong to one PE only. With horizontal memories H(r,c),
// c = 0..COLS, between PE(r,c-1) and PE(r,c), and vertical memories V(r,c),
// r = 0..ROWS, between PE(r-1,c) and PE(r,c), the array holds
// ROWS*(COLS+1) + (ROWS+1)*COLS spMEMs: 60 for the 5 x 5 array. Because the
// neighbourhoods of adjacent PEs overlap in the shared memories, good
// solutions migrate slowly across the whole population, which is what makes
// this a cellular GA. Port A of a spMEM faces the PE to its west or north,
// port B the PE to its east or south.
//
// Around the array: the global random generator (ca_rng) feeds a chain of
// rng_link registers, one per PE in row-major order, so PE i gets a fresh
// random word every cycle; the command ring of comm_node stops, also in
// row-major order, carries packets from the controller (cgac) to every PE
// and back; the controller is the host's memory-mapped port (hs_*).
// Every block runs on one clock and an active-low asynchronous reset; PEs run
// independently of one another and meet only in the spMEM locks.
//
// The array, the four-memory neighbourhood, the shared memories and the
// controller / random-number / command infrastructures follow the document;
// the 5 x 5 default is its largest array. The ring and chain orders and the
// edge memories' unused ports being idle are this design's choices.
module cgap_top
  import cgap_pkg::*;
#(
  parameter int ROWS = 5,
  parameter int COLS = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          hs_wr,
  input  logic [7:0]    hs_addr,
  input  logic [DW-1:0] hs_wdata,
  output logic [DW-1:0] hs_rdata,
  output logic [DW-1:0] lock_refusals   // spMEM lock requests refused so far
);

  localparam int NPE = ROWS * COLS;

  localparam int NH  = ROWS * (COLS + 1);
  localparam int NV  = (ROWS + 1) * COLS;

  spmem_req_t pe_req [NPE][4];
  logic [NH+NV-1:0] coll;
  spmem_rsp_t pe_rsp [NPE][4];

  // ---------------- horizontal spMEMs: west/east sides --------------------
  for (genvar r = 0; r < ROWS; r++) begin : g_hrow
    for (genvar c = 0; c <= COLS; c++) begin : g_hcol
      spmem_req_t ra, rb;
      spmem_rsp_t sa, sb;
      assign ra = (c > 0)    ? pe_req[r*COLS + c - 1][1] : SPMEM_REQ_IDLE;
      assign rb = (c < COLS) ? pe_req[r*COLS + c][3]     : SPMEM_REQ_IDLE;
      spmem u_mem (.clk, .rst_n, .req_a(ra), .req_b(rb), .rsp_a(sa), .rsp_b(sb),
                   .collision(coll[r*(COLS+1) + c]));
      if (c > 0)    begin : g_a assign pe_rsp[r*COLS + c - 1][1] = sa; end
      if (c < COLS) begin : g_b assign pe_rsp[r*COLS + c][3]     = sb; end
    end
  end

  // ---------------- vertical spMEMs: north/south sides --------------------
  for (genvar r = 0; r <= ROWS; r++) begin : g_vrow
    for (genvar c = 0; c < COLS; c++) begin : g_vcol
      spmem_req_t ra, rb;
      spmem_rsp_t sa, sb;
      assign ra = (r > 0)    ? pe_req[(r-1)*COLS + c][2] : SPMEM_REQ_IDLE;
      assign rb = (r < ROWS) ? pe_req[r*COLS + c][0]     : SPMEM_REQ_IDLE;
      spmem u_mem (.clk, .rst_n, .req_a(ra), .req_b(rb), .rsp_a(sa), .rsp_b(sb),
                   .collision(coll[NH + r*COLS + c]));
      if (r > 0)    begin : g_a assign pe_rsp[(r-1)*COLS + c][2] = sa; end
      if (r < ROWS) begin : g_b assign pe_rsp[r*COLS + c][0]     = sb; end
    end
  end

  // refused lock requests, all spMEMs together (one per memory per cycle)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lock_refusals <= '0;
    else        lock_refusals <= lock_refusals + DW'($countones(coll));
  end

  // ---------------- random numbers -----------------------------------------
  logic [RW-1:0] rnd_chain [NPE+1];

  ca_rng #(.W(RW)) u_rng (.clk, .rst_n, .rnd(rnd_chain[0]));

  // ---------------- command ring -------------------------------------------
  ring_pkt_t ring [NPE+1];

  cgac #(.NUM_PE(NPE)) u_cgac (
    .clk, .rst_n, .hs_wr, .hs_addr, .hs_wdata, .hs_rdata,
    .ring_out(ring[0]), .ring_in(ring[NPE])
  );

  // ---------------- processing elements ------------------------------------
  for (genvar i = 0; i < NPE; i++) begin : g_pe
    logic          cmd_valid;
    cmd_op_e       cmd_op;
    logic [15:0]   cmd_addr;
    logic [DW-1:0] cmd_data, rsp_data;

    rng_link #(.W(RW)) u_link (.clk, .rst_n, .rnd_in(rnd_chain[i]),
                               .rnd_out(rnd_chain[i+1]));

    comm_node #(.ID(8'(i))) u_node (
      .clk, .rst_n, .pkt_in(ring[i]), .pkt_out(ring[i+1]),
      .cmd_valid, .cmd_op, .cmd_addr, .cmd_data, .rsp_data
    );

    pe u_pe (
      .clk, .rst_n, .rnd(rnd_chain[i+1]),
      .mem_req(pe_req[i]), .mem_rsp(pe_rsp[i]),
      .cmd_valid, .cmd_op, .cmd_addr, .cmd_data, .rsp_data
    );
  end

endmodule
