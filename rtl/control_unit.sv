// control_unit: sequencer of the DA LMS adaptive filter.
//
// After reset it sweeps all 2^N RAM addresses with rd_wr high so that every
// partial product starts at zero (W(0) = 0), requests the first sample (sc)
// and loads it (lr) B cycles later, the same lead the converter gets in every
// sample period. From then on every sample period takes 2B+2 cycles:
//
//   FILTER  B cycles  shift, lacc; RAM read at slice j = B-1 ... 0 (LSB
//                     first); s_a on the last (sign) slice; sc on the first
//                     cycle asks the A/D for the next sample
//   LATCH   1 cycle   lr: y(k) and d(k) into their buffers, s(k+1) into PISO
//   OUTPUT  1 cycle   lbuff_op: y(k) to the output buffer; clacc
//   UPDATE  B cycles  shift with re_turn, rd_wr: every slice j = B-1 ... 0 is
//                     addressed again and its partial product rewritten
//
// jbit gives the slice index j of the current cycle; init_addr the address of
// the initialisation sweep; ready goes high when the sweep is done.
// The strobe names and their roles follow the architecture's control unit;
// the state sequence, its cycle counts and the initialisation sweep are this
// design's choices.
module control_unit
  import da_lms_pkg::*;
#(
  parameter int N   = 16,  // filter length (RAM address bits)
  parameter int B   = 16,  // input word length
  localparam int JW = (B > 1) ? $clog2(B) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output ctrl_t         ctrl,
  output logic [JW-1:0] jbit,
  output logic [N-1:0]  init_addr,
  output logic          ready
);
  localparam logic [JW-1:0] LAST = JW'(B - 1);

  logic [JW-1:0] cnt;       // counts slices within FILTER and UPDATE
  logic [N-1:0]  icnt;      // initialisation sweep address
  state_t        state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_INIT;
      cnt   <= '0;
      icnt  <= '0;
      ready <= 1'b0;
    end else begin
      unique case (state)
        ST_INIT: begin
          icnt <= icnt + 1'b1;
          if (icnt == '1) begin
            state <= ST_PRIME_SC;
            cnt   <= '0;
          end
        end
        ST_PRIME_SC: begin
          cnt <= cnt + 1'b1;
          if (cnt == LAST) state <= ST_PRIME_LR;
        end
        ST_PRIME_LR: begin
          state <= ST_FILTER;
          cnt   <= '0;
          ready <= 1'b1;
        end
        ST_FILTER: begin
          cnt <= cnt + 1'b1;
          if (cnt == LAST) state <= ST_LATCH;
        end
        ST_LATCH:  state <= ST_OUTPUT;
        ST_OUTPUT: begin
          state <= ST_UPDATE;
          cnt   <= '0;
        end
        ST_UPDATE: begin
          cnt <= cnt + 1'b1;
          if (cnt == LAST) begin
            state <= ST_FILTER;
            cnt   <= '0;
          end
        end
        default: state <= ST_INIT;
      endcase
    end
  end

  always_comb begin
    ctrl         = '0;
    ctrl.init    = (state == ST_INIT);
    ctrl.rd_wr   = (state == ST_INIT) || (state == ST_UPDATE);
    ctrl.clacc   = (state == ST_INIT) || (state == ST_OUTPUT);
    ctrl.sc      = (state == ST_PRIME_SC || state == ST_FILTER) && (cnt == '0);
    ctrl.lr      = (state == ST_PRIME_LR) || (state == ST_LATCH);
    ctrl.shift   = (state == ST_FILTER) || (state == ST_UPDATE);
    ctrl.lacc    = (state == ST_FILTER);
    ctrl.s_a     = (state == ST_FILTER) && (cnt == LAST);
    ctrl.lbuff_op = (state == ST_OUTPUT);
    ctrl.re_turn = (state == ST_UPDATE);
  end

  assign jbit      = LAST - cnt;
  assign init_addr = icnt;
  // Rules of the schedule: the RAM is never written while ACC accumulates,
  // a sample is never loaded while the delay line shifts, and the update
  // pass always recirculates.
  always_comb begin
    a_no_wr_in_acc:     assert (!(ctrl.rd_wr && ctrl.lacc));
    a_no_load_in_shift: assert (!(ctrl.lr && ctrl.shift));
    a_update_recirc:    assert (!(ctrl.rd_wr && !ctrl.init) || ctrl.re_turn);
  end
endmodule
