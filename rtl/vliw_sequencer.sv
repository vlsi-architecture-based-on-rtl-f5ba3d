// vliw_sequencer: step counter and mode control of the VLIW-controlled processor.
//
// The program is a list of steps. Step k's length L (the number of transfer clock cycles
// of the step, from the VLIW word) is held in a step-length memory; the per-module
// fields of the same VLIW word sit in each module's control memory at address pc.
// A step runs as:
//   1 cycle  MODE_PE  PE-router transfer: every PE's packet enters its router
//   L-1 cyc  MODE_RR  router-router transfer: packets shift one router per cycle
//   1 cycle  exec     network idle, every PE performs its operation
// so a step takes L+1 cycles and a packet can travel L-1 routers. A step length of 0
// ends the program: that step's first cycle is idle and done pulses for one cycle at
// its end (also after the last of DEPTH steps). start is taken only when idle.
// The split of a step into transfer cycles and one operation cycle, and the end marker,
// are this design's choices.
module vliw_sequencer
  import pdta_pkg::*;
#(
  parameter int unsigned DEPTH = CTRL_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  len_we,     // host load of the step-length memory
  input  logic [AW-1:0]         len_waddr,
  input  logic [STEP_LEN_W-1:0] len_wdata,
  output mode_e                 mode,
  output logic                  exec,
  output logic [AW-1:0]         pc,
  output logic                  busy,
  output logic                  done
);

  typedef enum logic [1:0] {S_IDLE, S_XFER, S_EXEC} state_e;

  state_e                state;
  logic [STEP_LEN_W-1:0] cnt, len;

  control_memory #(.WIDTH(STEP_LEN_W), .DEPTH(DEPTH)) u_len (
    .clk, .we(len_we), .waddr(len_waddr), .wdata(len_wdata), .raddr(pc), .rdata(len)
  );

  always_comb begin
    exec = (state == S_EXEC);
    busy = (state != S_IDLE);
    if (state == S_XFER && len != '0) mode = (cnt == '0) ? MODE_PE : MODE_RR;
    else                              mode = MODE_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      pc    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_XFER;
          cnt   <= '0;
        end
        S_XFER: if (len == '0) begin
          state <= S_IDLE;
          pc    <= '0;
          done  <= 1'b1;
        end else if (cnt == len - 1'b1) begin
          state <= S_EXEC;
        end else begin
          cnt <= cnt + 1'b1;
        end
        S_EXEC: begin
          cnt <= '0;
          if (pc == AW'(DEPTH - 1)) begin
            state <= S_IDLE;
            pc    <= '0;
            done  <= 1'b1;
          end else begin
            state <= S_XFER;
            pc    <= pc + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Every transfer phase opens with exactly one PE-router cycle.
  a_pe_then_rr: assert property (@(posedge clk) disable iff (!rst_n)
    (mode == MODE_PE) |=> (mode != MODE_PE));

endmodule
