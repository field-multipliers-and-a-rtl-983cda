// main_fsm: main state machine of the Montgomery point multiplication.
//
// Runs the Montgomery ladder for mP:
//     P1 <- P, P2 <- 2P
//     for each bit m_i below the leading one bit, from the top down:
//       if m_i = 1:  P1 <- P1 + P2,  P2 <- 2*P2
//       else         P2 <- P1 + P2,  P1 <- 2*P1
//     convert P1 to affine coordinates
// The ladder points live at fixed operand-memory locations. For each key
// bit the machine puts the addresses of the points the step works on onto
// its parameter address port (registered) and only then triggers the point
// addition machine, waits for it, sets the parameter addresses for the
// doubling and triggers the doubling machine. Only one sub-machine is active
// at a time. At the end it triggers the affine conversion machine.
//
// The machine itself drives the datapath only while it sets up the ladder
// (own_active): X1 = x, Z1 = 1, X2 = x^4 + b, Z2 = x^2, and when m = 0, where
// it clears the result and reports infinity.
//
// Interface: start (one cycle, while busy is low) latches the N-bit scalar m.
// The leading one bit is searched one bit per cycle from the top. done
// pulses for one cycle when the result is in memory; inf (valid from done
// until the next start) marks the point at infinity.
module main_fsm
  import ecc_pkg::*;
#(
  parameter int unsigned N = FIELD_N
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N-1:0]      m,
  output logic              busy,
  output logic              done,
  output logic              inf,
  // parameter address port
  output logic [ADDR_W-1:0] param_addr [4],
  // sub-machine triggers and completions
  output logic              go_add,
  output logic              go_dbl,
  output logic              go_conv,
  input  logic              add_done,
  input  logic              dbl_done,
  input  logic              conv_done,
  input  logic              conv_inf,
  // own datapath control
  output ctrl_t             ctrl,
  output logic              own_active);
  typedef enum logic [3:0] {
    IDLE, SCAN, ZERO, INIT0, INIT1, INIT2, STEP, ADD_GO, ADD_WAIT,
    DBL_GO, DBL_WAIT, CONV_GO, CONV_WAIT, CONV_END, FIN
  } state_e;
  state_e state;

  localparam int unsigned IW = $clog2(N);
  logic [N-1:0]  m_reg;
  logic [IW-1:0] idx;
  logic          key_bit;   // key bit of the current ladder step

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      m_reg      <= '0;
      idx        <= '0;
      key_bit    <= 1'b0;
      inf        <= 1'b0;
      param_addr <= '{default: '0};
    end else begin
      unique case (state)
        IDLE: if (start) begin
          m_reg <= m;
          idx   <= IW'(N - 1);
          state <= SCAN;
        end
        SCAN:                                   // find the leading one
          if (m_reg[idx])     state <= INIT0;
          else if (idx == '0) state <= ZERO;
          else                idx   <= idx - 1'b1;
        ZERO: begin
          inf   <= 1'b1;
          state <= FIN;
        end
        INIT0: state <= INIT1;
        INIT1: state <= INIT2;
        INIT2: state <= STEP;
        STEP:
          if (idx == '0) state <= CONV_GO;
          else begin
            idx     <= idx - 1'b1;
            key_bit <= m_reg[idx - 1'b1];
            // addition: parameters 0,1 = target point, 2,3 = other point
            if (m_reg[idx - 1'b1]) param_addr <= '{A_X1, A_Z1, A_X2, A_Z2};
            else                   param_addr <= '{A_X2, A_Z2, A_X1, A_Z1};
            state <= ADD_GO;
          end
        ADD_GO: state <= ADD_WAIT;
        ADD_WAIT: if (add_done) begin
          // doubling: parameters 0,1 = the point that is doubled
          if (key_bit) param_addr <= '{A_X2, A_Z2, A_X2, A_Z2};
          else         param_addr <= '{A_X1, A_Z1, A_X1, A_Z1};
          state <= DBL_GO;
        end
        DBL_GO: state <= DBL_WAIT;
        DBL_WAIT: if (dbl_done) state <= STEP;
        CONV_GO: state <= CONV_WAIT;
        CONV_WAIT: if (conv_done) state <= CONV_END;
        CONV_END: begin                         // conv_inf is valid now
          inf   <= conv_inf;
          state <= FIN;
        end
        FIN: state <= IDLE;
        default: state <= IDLE;
      endcase
      if (state == IDLE && start) inf <= 1'b0;
    end
  end

  // Own use of the datapath: ladder set-up and the m = 0 result.
  always_comb begin
    ctrl = CTRL_IDLE;
    unique case (state)
      INIT0: begin
        ctrl.pa = rd_dir(A_X);
        ctrl.pb = rd_dir(A_B);
      end
      INIT1: begin
        ctrl.sqr0_src = SRC_RDA;                      // x^2
        ctrl.sqr1_src = SRC_SQR0;                     // x^4
        ctrl.add1_a   = SRC_SQR1;
        ctrl.add1_b   = SRC_RDB;                      // x^4 + b
        ctrl.pa = wr_dir(A_X1, SRC_RDA);
        ctrl.pb = wr_dir(A_X2, SRC_ADD1);
      end
      INIT2: begin
        ctrl.sqr0_src = SRC_RDA;                      // x^2
        ctrl.pa = wr_dir(A_Z1, SRC_ONE);
        ctrl.pb = wr_dir(A_Z2, SRC_SQR0);
      end
      ZERO: begin
        ctrl.pa = wr_dir(A_RX, SRC_ZERO);
        ctrl.pb = wr_dir(A_RY, SRC_ZERO);
      end
      default: ;
    endcase
  end

  assign own_active = (state inside {INIT0, INIT1, INIT2, ZERO});
  assign go_add     = (state == ADD_GO);
  assign go_dbl     = (state == DBL_GO);
  assign go_conv    = (state == CONV_GO);
  assign busy       = (state != IDLE);
  assign done       = (state == FIN);
endmodule
