// proc_control -- sequencer of the processing section, including the
// multiplexer that reads whichever ping-pong FIFO is not being written.
//
// Runs on the processing clock clk. A toggle of blk_tgl (from the input
// clock domain, synchronised here) announces a full FIFO holding load
// non-zero entries. The sequencer then
//   IDLE  : clears the accumulators (acc_clr) and the FIFO read pointer;
//   FETCH : one cycle; loads the first entry into the coefficient shift
//           register and the accumulators (ld) and advances the FIFO;
//   RUN   : 13 cycles per coefficient, the shift registers shifting; in the
//           13th cycle the next entry is loaded the same way, so
//           coefficients follow back to back with no idle cycle;
//   DONE  : one cycle; blk_done pulses (the accumulators hold the finished
//           block), done_tgl toggles back to the input side and the read
//           selection moves to the other FIFO.
// A block with load = 0 goes straight from IDLE to DONE (all-zero output).
// From the first ld to blk_done a block with N entries takes one FETCH cycle plus exactly 13*N
// cycles after the FETCH cycle. bus_pos / bus_sign / bus_mag are the selected FIFO's current word.
//
// Taken from the original architecture: 13 cycles per non-zero coefficient, ping-pong read
// side. Own choices: the state sequence, the toggle hand-over, and the
// one-cycle FETCH and DONE overheads (plus two cycles of synchroniser
// latency), i.e. 13*N + 5 processing cycles per block from hand-over.
module proc_control
  import ddidct_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              blk_tgl,
  input  logic [LOAD_W-1:0] load,
  input  coef_entry_t       fifo0_q,
  input  coef_entry_t       fifo1_q,
  output logic [1:0]        fifo_r,
  output logic [1:0]        fifo_rclr,
  output logic [POS_W-1:0]  bus_pos,
  output logic              bus_sign,
  output logic [MAG_W-1:0]  bus_mag,
  output logic              ld,
  output logic              shift,
  output logic              acc_clr,
  output logic              blk_done,
  output logic              done_tgl,
  output logic              busy
);
  typedef enum logic [1:0] {IDLE, FETCH, RUN, DONE} state_t;

  state_t            state;
  logic              rsel, tgl_s, tgl_seen, req;
  logic [LOAD_W-1:0] left;
  logic [3:0]        bitcnt;
  coef_entry_t       q;

  sync_2ff u_sync (.clk, .rst_n, .d(blk_tgl), .q(tgl_s));

  assign req      = (tgl_s != tgl_seen);
  assign q        = rsel ? fifo1_q : fifo0_q;
  assign bus_pos  = q.pos;
  assign bus_sign = q.sign;
  assign bus_mag  = q.mag;

  always_comb begin
    ld       = (state == FETCH) ||
               (state == RUN && bitcnt == 4'(NBITS-1) && left != '0);
    shift    = (state == RUN);
    acc_clr  = (state == IDLE) && req;
    blk_done = (state == DONE);
    busy     = (state != IDLE);
    fifo_r          = 2'b00;
    fifo_r[rsel]    = ld;
    fifo_rclr       = 2'b00;
    fifo_rclr[rsel] = acc_clr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      rsel     <= 1'b0;
      tgl_seen <= 1'b0;
      left     <= '0;
      bitcnt   <= '0;
      done_tgl <= 1'b0;
    end else begin
      case (state)
        IDLE: if (req) begin
          tgl_seen <= tgl_s;
          left     <= load;
          state    <= (load == '0) ? DONE : FETCH;
        end
        FETCH: begin
          left   <= left - 1'b1;
          bitcnt <= '0;
          state  <= RUN;
        end
        RUN: begin
          if (bitcnt == 4'(NBITS-1)) begin
            bitcnt <= '0;
            if (left != '0) left  <= left - 1'b1;
            else            state <= DONE;
          end else begin
            bitcnt <= bitcnt + 1'b1;
          end
        end
        DONE: begin
          done_tgl <= ~done_tgl;
          rsel     <= ~rsel;
          state    <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // a load only while a block is being processed, at most one FIFO read
  a_ld_busy:  assert property (@(posedge clk) disable iff (!rst_n)
    ld |-> (state == FETCH || state == RUN));
  a_one_read: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(fifo_r));
  // the block length never runs below zero
  a_left:     assert property (@(posedge clk) disable iff (!rst_n)
    (state == RUN && bitcnt == 4'(NBITS-1) && left != '0) |=> left != '1);
endmodule
