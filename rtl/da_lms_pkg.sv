// da_lms_pkg: types shared by the blocks of the distributed-arithmetic (DA)
// LMS adaptive filter.
//
// ctrl_t bundles the strobes that the control unit drives into the datapath.
// The strobe names follow the control-unit outputs of the architecture
// (lr, rd_wr, lacc, clacc, s_a, lbuff_op, re_turn, sc). Its "clk" output is
// called "shift" here, because the whole design runs on one system clock and
// that line acts as a shift enable for the PISO/SISO registers. The "init"
// strobe and the state encoding are this design's own additions.
package da_lms_pkg;

  // Phases of one sample period (plus the power-up initialisation).
  typedef enum logic [2:0] {
    ST_INIT     = 3'd0,  // write zero into every partial product (W(0) = 0)
    ST_PRIME_SC = 3'd1,  // request the first sample from the A/D
    ST_PRIME_LR = 3'd2,  // load the first sample into the PISO
    ST_FILTER   = 3'd3,  // B cycles: bit-serial RAM reads, shift-accumulate y(k)
    ST_LATCH    = 3'd4,  // lr: capture y(k) and d(k), load the next sample
    ST_OUTPUT   = 3'd5,  // lbuff_op + clacc: present y(k), clear ACC
    ST_UPDATE   = 3'd6   // B cycles: re-address, write P(k+1) back
  } state_t;

  typedef struct packed {
    logic shift;     // shift enable for PISO and SISOs ("clk" in the architecture)
    logic lr;        // load PISO, y buffer and d buffer
    logic rd_wr;     // 1 = write the partial-product RAM, 0 = read
    logic lacc;      // load the accumulator
    logic clacc;     // clear the accumulator
    logic s_a;       // 1 = subtract the RAM word (sign-bit slice), 0 = add
    logic lbuff_op;  // load the output buffer towards the D/A
    logic re_turn;   // SISOs recirculate and address the RAM a second time
    logic sc;        // start-of-conversion request to the A/D
    logic init;      // RAM initialisation sweep in progress
  } ctrl_t;

endpackage
