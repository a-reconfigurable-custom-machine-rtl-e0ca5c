// cgac: cellular GA controller, the bridge between a host processor and the
// PE array.
//
// The host sees a small bank of 32-bit registers (word address hs_addr[7:2],
// combinational read, write on hs_wr):
//   0 CMD_GO     W  send one command packet: op = wdata[1:0] (1 write, 2 read)
//   1 CMD_DEST   RW PE index of that packet, 255 = all PEs
//   2 CMD_ADDR   RW PE register / table address (see cgap_pkg)
//   3 CMD_DATA   RW write data
//   4 CMD_RDATA  R  data returned by the last packet
//   5 TARGET_GEN RW global stop criterion: solutions to generate in total
//   6 START      W  run the whole algorithm (see below)
//   7 STATUS     R  bit0 busy, bit1 done, bit2 last packet acknowledged,
//                   bits 11:8 phase
//   8 BEST_FIT   R  best fitness found, 9 BEST_PE R its PE,
//  10 TOTAL_GEN  R  solutions generated, 11 ABORT W stop the run now
// Set-up (instance size, tables L, C, B) is done with CMD_GO packets, usually
// broadcast. START then runs by itself: INIT broadcast, poll every PE's
// status until all have filled their memories, RUN broadcast, poll the PEs'
// generation counters until their sum reaches TARGET_GEN (or ABORT), STOP
// broadcast, wait until every PE has finished its current solution, add up
// the final counts and find the PE holding the best solution. The host then
// reads that solution's rows from BEST_PE with CMD_GO reads.
//
// Packets travel the command ring (comm_node); the controller keeps one in
// flight and waits NUM_PE cycles for it to come back. The document says what
// the controller does (configure, run/stop on a global stop criterion,
// retrieve the best solution); it builds it by high-level synthesis and
// gives no insides. The register map and the polling sequence are this
// design's own.
module cgac
  import cgap_pkg::*;
#(
  parameter int NUM_PE = 25
) (
  input  logic          clk,
  input  logic          rst_n,
  // host (memory-mapped)
  input  logic          hs_wr,
  input  logic [7:0]    hs_addr,
  input  logic [DW-1:0] hs_wdata,
  output logic [DW-1:0] hs_rdata,
  // command ring
  output ring_pkt_t     ring_out,
  input  ring_pkt_t     ring_in
);

  typedef enum logic [3:0] {
    P_IDLE, P_HOST, P_INIT, P_WAIT_INIT, P_RUN, P_POLL_GEN, P_STOP,
    P_WAIT_STOP, P_SCAN_GEN, P_SCAN_BEST
  } phase_e;

  localparam logic [5:0] A_CMD_GO = 0, A_CMD_DEST = 1, A_CMD_ADDR = 2,
                         A_CMD_DATA = 3, A_CMD_RDATA = 4, A_TARGET = 5,
                         A_START = 6, A_STATUS = 7, A_BEST_FIT = 8,
                         A_BEST_PE = 9, A_TOTAL = 10, A_ABORT = 11;

  phase_e        phase;
  logic          inflight, done, acked, abort_req, any_busy;
  logic [7:0]    cmd_dest;
  logic [15:0]   cmd_addr;
  logic [DW-1:0] cmd_data, cmd_rdata, target, best_fit, total, sum;
  cmd_op_e       cmd_op;
  logic [7:0]    best_pe, idx;

  logic [5:0] ra;
  assign ra = hs_addr[7:2];

  always_comb begin
    unique case (ra)
      A_CMD_DEST:  hs_rdata = DW'(cmd_dest);
      A_CMD_ADDR:  hs_rdata = DW'(cmd_addr);
      A_CMD_DATA:  hs_rdata = cmd_data;
      A_CMD_RDATA: hs_rdata = cmd_rdata;
      A_TARGET:    hs_rdata = target;
      A_STATUS:    hs_rdata = DW'({phase, 5'b0, acked, done, phase != P_IDLE});
      A_BEST_FIT:  hs_rdata = best_fit;
      A_BEST_PE:   hs_rdata = DW'(best_pe);
      A_TOTAL:     hs_rdata = total;
      default:     hs_rdata = '0;
    endcase
  end

  // the packet each phase sends
  function automatic ring_pkt_t mk(logic [7:0] dest, cmd_op_e op,
                                   logic [15:0] addr, logic [DW-1:0] data);
    return '{valid: 1'b1, ack: 1'b0, dest: dest, op: op, addr: addr, data: data};
  endfunction

  ring_pkt_t pkt;
  always_comb begin
    unique case (phase)
      P_HOST:                   pkt = mk(cmd_dest, cmd_op, cmd_addr, cmd_data);
      P_INIT:                   pkt = mk(DEST_ALL, OP_WR, pe_addr(REG_CFG, 6'd0, {4'd0, R_CTRL}), CTRL_INIT);
      P_RUN:                    pkt = mk(DEST_ALL, OP_WR, pe_addr(REG_CFG, 6'd0, {4'd0, R_CTRL}), CTRL_RUN);
      P_STOP:                   pkt = mk(DEST_ALL, OP_WR, pe_addr(REG_CFG, 6'd0, {4'd0, R_CTRL}), CTRL_STOP);
      P_WAIT_INIT, P_WAIT_STOP: pkt = mk(idx, OP_RD, pe_addr(REG_CFG, 6'd0, {4'd0, R_STATUS}), '0);
      P_POLL_GEN, P_SCAN_GEN:   pkt = mk(idx, OP_RD, pe_addr(REG_CFG, 6'd0, {4'd0, R_GENS}), '0);
      P_SCAN_BEST:              pkt = mk(idx, OP_RD, pe_addr(REG_CFG, 6'd0, {4'd0, R_BEST}), '0);
      default:                  pkt = '0;
    endcase
  end

  logic last;
  assign last = (idx == 8'(NUM_PE - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= P_IDLE;
      inflight  <= 1'b0;
      done      <= 1'b0;
      acked     <= 1'b0;
      abort_req <= 1'b0;
      any_busy  <= 1'b0;
      cmd_dest  <= '0;
      cmd_addr  <= '0;
      cmd_data  <= '0;
      cmd_op    <= OP_NOP;
      cmd_rdata <= '0;
      target    <= '0;
      best_fit  <= '0;
      best_pe   <= '0;
      total     <= '0;
      sum       <= '0;
      idx       <= '0;
      ring_out  <= '0;
    end else begin
      ring_out <= '0;

      // host writes
      if (hs_wr) begin
        unique case (ra)
          A_CMD_DEST: cmd_dest <= hs_wdata[7:0];
          A_CMD_ADDR: cmd_addr <= hs_wdata[15:0];
          A_CMD_DATA: cmd_data <= hs_wdata;
          A_TARGET:   target   <= hs_wdata;
          A_CMD_GO: if (phase == P_IDLE) begin
            cmd_op <= cmd_op_e'(hs_wdata[1:0]);
            acked  <= 1'b0;
            phase  <= P_HOST;
          end
          A_START: if (phase == P_IDLE) begin
            done      <= 1'b0;
            abort_req <= 1'b0;
            phase     <= P_INIT;
          end
          A_ABORT: if (phase != P_IDLE) abort_req <= 1'b1;
          default: ;
        endcase
      end

      if (phase != P_IDLE) begin
        if (!inflight) begin
          ring_out <= pkt;
          inflight <= 1'b1;
        end else if (ring_in.valid) begin
          inflight <= 1'b0;
          unique case (phase)
            P_HOST: begin
              cmd_rdata <= ring_in.data;
              acked     <= ring_in.ack;
              phase     <= P_IDLE;
            end
            P_INIT: begin
              idx <= '0; any_busy <= 1'b0; phase <= P_WAIT_INIT;
            end
            P_RUN: begin
              idx <= '0; sum <= '0; phase <= P_POLL_GEN;
            end
            P_STOP: begin
              idx <= '0; any_busy <= 1'b0; phase <= P_WAIT_STOP;
            end
            P_WAIT_INIT, P_WAIT_STOP: begin
              idx      <= last ? '0 : idx + 1'b1;
              any_busy <= last ? 1'b0 : (any_busy | ring_in.data[0]);
              if (last && !(any_busy | ring_in.data[0])) begin
                sum   <= '0;
                phase <= (phase == P_WAIT_INIT) ? P_RUN : P_SCAN_GEN;
              end
            end
            P_POLL_GEN: begin
              idx <= last ? '0 : idx + 1'b1;
              sum <= last ? '0 : sum + ring_in.data;
              if (last) begin
                total <= sum + ring_in.data;
                if (abort_req || sum + ring_in.data >= target) phase <= P_STOP;
              end
            end
            P_SCAN_GEN: begin
              idx <= last ? '0 : idx + 1'b1;
              sum <= sum + ring_in.data;
              if (last) begin
                total    <= sum + ring_in.data;
                best_fit <= '0;
                best_pe  <= '0;
                phase    <= P_SCAN_BEST;
              end
            end
            P_SCAN_BEST: begin
              idx <= last ? '0 : idx + 1'b1;
              if (idx == '0 || ring_in.data > best_fit) begin
                best_fit <= ring_in.data;
                best_pe  <= idx;
              end
              if (last) begin
                done  <= 1'b1;
                phase <= P_IDLE;
              end
            end
            default: phase <= P_IDLE;
          endcase
        end
      end
    end
  end

  // one packet at a time: nothing comes back unless one is in flight
  a_ring_order: assert property (@(posedge clk) disable iff (!rst_n)
                                 ring_in.valid |-> inflight)
    else $error("cgac: packet returned with none in flight");

endmodule
