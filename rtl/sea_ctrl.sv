// sea_ctrl: round controller of the SEA loop core.
//
// A block takes one load cycle and then NR round cycles, one round per clock
// (data round and key round in the same cycle). With M = floor(NR/2) the
// controller drives, for round i = 1..NR:
//   key round   i <  M      : FK with constant i
//               i == M      : FK with constant M, then switch KL/KR
//               M < i < NR  : FK with constant NR - i
//               i == NR     : switch only (restores the original key)
//   data key    KR for i <= M+1, KL for i > M+1
// This is the schedule of the SEA pseudo-code; folding the two switches into
// round cycles and the extra load cycle are this design's choices.
//
// Interface: start is accepted when busy is low (load is then high for that
// cycle); run is high during each of the NR round cycles; done pulses for
// one cycle after the last round, NR+1 cycles after the accepted start.
// Reset is asynchronous and active low.
module sea_ctrl
  import sea_pkg::*;
#(
  parameter int unsigned NR = 51,
  parameter int unsigned B  = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         load,
  output logic         run,
  output key_op_t      key_op,
  output logic [B-1:0] key_const,
  output logic         use_kl,
  output logic         busy,
  output logic         done
);

  localparam int unsigned M  = NR / 2;
  localparam int unsigned CW = $clog2(NR + 1);

  if (NR < 3 || NR % 2 == 0) begin : g_bad_nr
    $error("sea_ctrl: NR must be odd and at least 3");
  end

  logic [CW-1:0] cnt;

  assign load  = start && !busy;
  assign run   = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        busy <= 1'b1;
        cnt  <= CW'(1);
      end else if (busy) begin
        if (cnt == CW'(NR)) begin
          busy <= 1'b0;
          done <= 1'b1;
          cnt  <= '0;
        end else begin
          cnt <= cnt + CW'(1);
        end
      end
    end
  end

  always_comb begin
    key_op    = KEY_HOLD;
    key_const = '0;
    if (busy) begin
      if (cnt < CW'(M)) begin
        key_op    = KEY_FK;
        key_const = B'(cnt);
      end else if (cnt == CW'(M)) begin
        key_op    = KEY_FK_SWAP;
        key_const = B'(cnt);
      end else if (cnt < CW'(NR)) begin
        key_op    = KEY_FK;
        key_const = B'(CW'(NR) - cnt);
      end else begin
        key_op    = KEY_SWAP;
      end
    end
  end

  assign use_kl = busy && (cnt > CW'(M + 1));

  // done follows the last round, and the round count stays in 1..NR
  a_done_not_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_cnt_range:     assert property (@(posedge clk) disable iff (!rst_n) busy |-> (cnt >= CW'(1) && cnt <= CW'(NR)));

endmodule
