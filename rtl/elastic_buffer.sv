// elastic_buffer: SELF elastic buffer (EB), the elastic counterpart of a
// flip-flop. It stores up to two data tokens and talks SELF on both sides:
//   input channel  (vl, sl, dl)   - vl: producer has a token, sl: EB is full
//   output channel (vr, sr, dr)   - vr: EB holds a token,     sr: consumer stalls
//
// The controller is a Moore machine with three states whose outputs are the
// EB's own control outputs, as the SELF definition of an EB prescribes:
//   Empty -> vr=0 sl=0 (a bubble), Half -> vr=1 sl=0, Full -> vr=1 sl=1.
// Because vr and sl are registered, an EB cuts every combinational path of the
// control network, in both directions.
//
// Data plane: two flip-flop slots, 'head' (drives dr) and 'tail' (the second
// token in the Full state). This replaces the master/slave latch pair of the
// classic latch-based EB with edge-triggered storage; the token behaviour at the
// channels is the same. A token enters on vl & !sl and leaves on vr & !sr; a
// token can enter and leave in the same cycle, so a Half EB sustains one token
// per cycle with one cycle of latency.
//
// INIT selects the reset state (any of the three, as an EB can be initialised
// by its reset wiring); the tokens present after reset carry INIT_DATA. An EB
// reset to EB_EMPTY is a bubble.
//
// d_last is an addition of this design: it is the most recently accepted word,
// kept even after that token left. A register with a load enable (the
// instruction registers, the program counter) feeds d_last back as its 'hold'
// value, which is exactly the previous token of that register.
module elastic_buffer
  import elastic_pkg::*;
#(
  parameter int unsigned      WIDTH     = 8,
  parameter eb_state_e        INIT      = EB_HALF,
  parameter logic [WIDTH-1:0] INIT_DATA = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  // input (left) channel
  input  logic             vl,
  output logic             sl,
  input  logic [WIDTH-1:0] dl,
  // output (right) channel
  output logic             vr,
  input  logic             sr,
  output logic [WIDTH-1:0] dr,
  // last accepted data word
  output logic [WIDTH-1:0] d_last
);

  eb_state_e        state;
  logic [WIDTH-1:0] head, tail;
  logic             put, take;

  assign vr   = (state != EB_EMPTY);
  assign sl   = (state == EB_FULL);
  assign dr   = head;
  assign put  = vl & ~sl;
  assign take = vr & ~sr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= INIT;
      head   <= INIT_DATA;
      tail   <= INIT_DATA;
      d_last <= INIT_DATA;
    end else begin
      if (put) d_last <= dl;
      unique case (state)
        EB_EMPTY: if (put) begin
          head  <= dl;
          state <= EB_HALF;
        end
        EB_HALF: begin
          if (put && take) head <= dl;
          else if (put) begin
            tail  <= dl;
            state <= EB_FULL;
          end else if (take) state <= EB_EMPTY;
        end
        EB_FULL: if (take) begin
          head  <= tail;
          state <= EB_HALF;
        end
        default: state <= EB_EMPTY;
      endcase
    end
  end

  // SELF rule on the output channel: a token offered in Retry is offered again,
  // unchanged, in the next cycle (Retry may not turn into Idle).
  property p_retry_persists;
    @(posedge clk) disable iff (!rst_n) (vr && sr) |=> (vr && $stable(dr));
  endproperty
  a_retry_persists: assert property (p_retry_persists);

endmodule
