// sdc_mode_ctrl: operation-mode state machine of the IDU.
//
// Modes: single (CORE_B idle), superscalar (the reset mode), multithreading,
// and the two rendezvous states of multithreading: waiting for "joint" after a
// core fetched "wait", and waiting for "wait" after a core fetched "joint".
// The IDU reports each fetched extended instruction on cmd_valid/cmd with the
// fetching core and whether that core is in system mode. Transitions:
//   superscalar  --single--> single      superscalar --mthd--> multithreading
//   single       --suprs-->  superscalar
//   multithreading --single--> single    multithreading --suprs--> superscalar
//   multithreading --wait--> waiting joint  --joint or suprs--> superscalar
//   multithreading --joint--> waiting wait  --wait or suprs-->  superscalar
// "suprs" counts only from a core in system mode. An extended instruction that
// is not valid in the current mode is ignored. The core that fetched wait or
// joint is halted (halt[core]) until the rendezvous completes.
// A switch to single, superscalar or multithreading is not immediate: `hold`
// rises, the IDU stops fetching, and the new mode is taken once both cores have
// drained (idle). The waiting states are entered at once. The transitions are
// those of the mode diagram of the architecture; the drain-before-switch
// follows its text; the halt of the waiting core and ignoring of invalid
// instructions are this design's reading.
module sdc_mode_ctrl
  import sdc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cmd_valid,
  input  ext_e  cmd,
  input  logic  cmd_core,
  input  logic  cmd_priv,
  input  logic  idle,
  output mode_e mode,
  output logic  hold,
  output logic  halt [2],
  output logic  switched     // pulses when a new mode is taken
);

  mode_e target;
  logic  pending, waiter;
  mode_e nxt;
  logic  go;

  // decode the command against the current mode
  always_comb begin
    go = 1'b0;
    nxt = mode;
    if (cmd_valid && !pending) begin
      unique case (mode)
        MODE_SUPER: begin
          if (cmd == EXT_SINGLE) begin go = 1'b1; nxt = MODE_SINGLE; end
          if (cmd == EXT_MTHD)   begin go = 1'b1; nxt = MODE_MTHD;   end
        end
        MODE_SINGLE:
          if (cmd == EXT_SUPRS && cmd_priv) begin go = 1'b1; nxt = MODE_SUPER; end
        MODE_MTHD: begin
          if (cmd == EXT_SINGLE) begin go = 1'b1; nxt = MODE_SINGLE; end
          if (cmd == EXT_SUPRS && cmd_priv) begin go = 1'b1; nxt = MODE_SUPER; end
          if (cmd == EXT_WAIT)  begin go = 1'b1; nxt = MODE_WAIT_JOINT; end
          if (cmd == EXT_JOINT) begin go = 1'b1; nxt = MODE_WAIT_WAIT;  end
        end
        MODE_WAIT_JOINT:
          if ((cmd == EXT_JOINT && cmd_core != waiter) || (cmd == EXT_SUPRS && cmd_priv)) begin
            go = 1'b1; nxt = MODE_SUPER;
          end
        MODE_WAIT_WAIT:
          if ((cmd == EXT_WAIT && cmd_core != waiter) || (cmd == EXT_SUPRS && cmd_priv)) begin
            go = 1'b1; nxt = MODE_SUPER;
          end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= MODE_SUPER;
      target   <= MODE_SUPER;
      pending  <= 1'b0;
      waiter   <= 1'b0;
      switched <= 1'b0;
    end else begin
      switched <= 1'b0;
      if (go && (nxt == MODE_WAIT_JOINT || nxt == MODE_WAIT_WAIT)) begin
        mode   <= nxt;
        waiter <= cmd_core;
      end else if (go) begin
        pending <= 1'b1;
        target  <= nxt;
      end else if (pending && idle) begin
        pending  <= 1'b0;
        mode     <= target;
        switched <= 1'b1;
      end
    end
  end

  assign hold = pending;
  always_comb begin
    halt[0] = (mode == MODE_WAIT_JOINT || mode == MODE_WAIT_WAIT) && waiter == 1'b0;
    halt[1] = (mode == MODE_WAIT_JOINT || mode == MODE_WAIT_WAIT) && waiter == 1'b1;
  end

endmodule
