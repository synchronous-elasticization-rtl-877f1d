// elastic_pkg: shared types of the SELF (Synchronous Elastic Flow) control plane.
//
// A SELF channel is a pair of wires, valid (forward) and stall (backward):
//   Transfer = V & !S, Idle = !V, Retry = V & S.
// An elastic buffer (EB) holds zero, one or two tokens; its state is visible on
// its own control outputs: Empty (!Vr & !Sl), Half (Vr & !Sl), Full (Vr & Sl).
// The fork and join flavours are the ones compared for the control network:
// lazy forks (LFork, LKFork), the eager fork (EFork) and two lazy joins
// (LJoin, LKJoin).
package elastic_pkg;

  // Number of tokens an elastic buffer holds after reset.
  typedef enum logic [1:0] {
    EB_EMPTY = 2'd0,
    EB_HALF  = 2'd1,
    EB_FULL  = 2'd2
  } eb_state_e;

  // Fork implementation used by a control network.
  typedef enum logic [1:0] {
    FORK_EAGER = 2'd0,  // EFork
    FORK_LK    = 2'd1,  // LKFork (lazy, per-branch valid)
    FORK_L     = 2'd2   // LFork  (lazy, shared valid)
  } fork_kind_e;

  // Join implementation used by a control network.
  typedef enum logic {
    JOIN_L  = 1'b0,     // LJoin  (stall gated by each input's valid)
    JOIN_LK = 1'b1      // LKJoin (one shared stall)
  } join_kind_e;

endpackage
