// pe: processing element with an adder, a multiplier and a local memory.
//
// Once per step, on the cycle in which exec is high, the PE performs the operation of
// its control word on the two receive registers of its router (rx_data[0], rx_data[1]):
// multiply, add, load a word from local memory, or store rx_data[0] into local memory.
// The result of a multiply, add or load becomes the PE's result, which is the data of
// the packet it injects (with its own source address MY_ADDR) in the PE-router cycle of
// a later step whose control word has send set. A loaded word is sent straight from the
// memory's read register.
//
// While the processor is idle the host owns the local-memory port (host_en); a host read
// replaces the memory's read register, so a result produced by a load does not survive a
// host read. Adder, multiplier and local memory follow the PE of the architecture; the
// operation set and the host port are this design's choices.
module pe
  import pdta_pkg::*;
#(
  parameter int unsigned MY_ADDR = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              exec,
  input  ctrl_word_t        ctrl,
  input  word_t             rx_data [N_RX],
  output packet_t           tx_pkt,
  input  logic              host_en,
  input  logic              host_we,
  input  logic              host_re,
  input  logic [MEM_AW-1:0] host_addr,
  input  word_t             host_wdata,
  output word_t             host_rdata
);

  word_t add_sum, mul_prod, result_q, mem_rdata;
  logic  from_mem_q, add_cout;

  cla_adder #(.DATA_W(DATA_W)) u_add (
    .a(rx_data[0]), .b(rx_data[1]), .cin(1'b0), .sum(add_sum), .cout(add_cout)
  );

  wallace_mul #(.DATA_W(DATA_W)) u_mul (
    .a(rx_data[0]), .b(rx_data[1]), .p(mul_prod)
  );

  logic              m_we, m_re;
  logic [MEM_AW-1:0] m_addr;
  word_t             m_wdata;

  always_comb begin
    if (host_en) begin
      m_we    = host_we;
      m_re    = host_re;
      m_addr  = host_addr;
      m_wdata = host_wdata;
    end else begin
      m_we    = exec && (ctrl.op == OP_STORE);
      m_re    = exec && (ctrl.op == OP_LOAD);
      m_addr  = ctrl.maddr;
      m_wdata = rx_data[0];
    end
  end

  local_memory #(.WIDTH(DATA_W), .DEPTH(MEM_DEPTH)) u_mem (
    .clk, .we(m_we), .re(m_re), .addr(m_addr), .wdata(m_wdata), .rdata(mem_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result_q   <= '0;
      from_mem_q <= 1'b0;
    end else if (exec) begin
      unique case (ctrl.op)
        OP_MUL:  begin result_q <= mul_prod; from_mem_q <= 1'b0; end
        OP_ADD:  begin result_q <= add_sum;  from_mem_q <= 1'b0; end
        OP_LOAD: from_mem_q <= 1'b1;
        default: ;
      endcase
    end
  end

  always_comb begin
    tx_pkt.valid = ctrl.send;
    tx_pkt.src   = addr_t'(MY_ADDR);
    tx_pkt.data  = from_mem_q ? mem_rdata : result_q;
  end

  assign host_rdata = mem_rdata;

  // The host may only use the memory port while the processor is idle.
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n) host_en |-> !exec);

endmodule
