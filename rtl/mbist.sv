// mbist: memory built-in self test for the histogram SRAMs.
//
// Runs the March C- algorithm on NUM_MEM identical SRAMs in parallel:
//   up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up(r0)
// where 0 is the all-zero and 1 the all-one word. One operation is issued
// per clock cycle; a read returns its data one edge later and is compared
// in the next cycle against the expected word, separately for each memory.
// A run takes 10 * WORDS + 1 cycles.
//
// Interface: start_i (one-cycle pulse) starts a run if none is active.
// While busy_o is high, bist_en_o gives the SRAM ports to this block,
// which drives one command {re_o, we_o, addr_o, wdata_o} to all memories and
// reads rdata_i from each. When the run ends done_o rises and stays high,
// and fail_o tells whether any memory returned a wrong word; fail_mask_o
// tells which. Both hold until the next start.
//
// From the reference study: the block includes MBIST. The algorithm and the
// interface are this design's choice.
module mbist #(
  parameter int unsigned WORDS   = 512,
  parameter int unsigned WIDTH   = 12,
  parameter int unsigned NUM_MEM = 4,
  parameter int unsigned AW      = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  output logic               bist_en_o,
  output logic               re_o,
  output logic               we_o,
  output logic [AW-1:0]      addr_o,
  output logic [WIDTH-1:0]   wdata_o,
  input  logic [WIDTH-1:0]   rdata_i [NUM_MEM],
  output logic               busy_o,
  output logic               done_o,
  output logic               fail_o,
  output logic [NUM_MEM-1:0] fail_mask_o
);

  localparam int unsigned N_ELEM = 6;

  // One march element: direction and up to two operations.
  typedef struct packed {
    logic down;
    logic two_ops;
    logic op0_wr, op0_val;
    logic op1_wr, op1_val;
  } elem_t;

  function automatic elem_t march(input logic [2:0] e);
    unique case (e)
      3'd0:    march = '{down: 1'b0, two_ops: 1'b0, op0_wr: 1'b1, op0_val: 1'b0, op1_wr: 1'b0, op1_val: 1'b0};
      3'd1:    march = '{down: 1'b0, two_ops: 1'b1, op0_wr: 1'b0, op0_val: 1'b0, op1_wr: 1'b1, op1_val: 1'b1};
      3'd2:    march = '{down: 1'b0, two_ops: 1'b1, op0_wr: 1'b0, op0_val: 1'b1, op1_wr: 1'b1, op1_val: 1'b0};
      3'd3:    march = '{down: 1'b1, two_ops: 1'b1, op0_wr: 1'b0, op0_val: 1'b0, op1_wr: 1'b1, op1_val: 1'b1};
      3'd4:    march = '{down: 1'b1, two_ops: 1'b1, op0_wr: 1'b0, op0_val: 1'b1, op1_wr: 1'b1, op1_val: 1'b0};
      default: march = '{down: 1'b0, two_ops: 1'b0, op0_wr: 1'b0, op0_val: 1'b0, op1_wr: 1'b0, op1_val: 1'b0};
    endcase
  endfunction

  logic             run_q;
  logic [2:0]       elem_q;
  logic             op_q;        // 0: first operation, 1: second
  logic [AW-1:0]    addr_q;
  elem_t            cur;
  logic             op_wr, op_val, last_op, last_addr;
  logic             cmp_q;       // a read was issued last cycle
  logic             exp_q;       // its expected background
  logic [AW-1:0]    first_addr;

  assign cur     = march(elem_q);
  assign op_wr   = op_q ? cur.op1_wr  : cur.op0_wr;
  assign op_val  = op_q ? cur.op1_val : cur.op0_val;
  assign last_op = !cur.two_ops || op_q;
  assign last_addr = cur.down ? (addr_q == '0) : (addr_q == AW'(WORDS - 1));

  always_comb begin
    first_addr = march(elem_q + 3'd1).down ? AW'(WORDS - 1) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q       <= 1'b0;
      elem_q      <= '0;
      op_q        <= 1'b0;
      addr_q      <= '0;
      cmp_q       <= 1'b0;
      exp_q       <= 1'b0;
      done_o      <= 1'b0;
      fail_mask_o <= '0;
    end else begin
      cmp_q <= run_q && !op_wr;
      exp_q <= op_val;
      if (cmp_q) begin
        for (int unsigned m = 0; m < NUM_MEM; m++) begin
          if (rdata_i[m] != {WIDTH{exp_q}}) fail_mask_o[m] <= 1'b1;
        end
      end
      if (!run_q) begin
        if (start_i && !cmp_q) begin
          run_q       <= 1'b1;
          elem_q      <= '0;
          op_q        <= 1'b0;
          addr_q      <= '0;
          done_o      <= 1'b0;
          fail_mask_o <= '0;
        end
      end else if (!last_op) begin
        op_q <= 1'b1;
      end else begin
        op_q <= 1'b0;
        if (!last_addr) begin
          addr_q <= cur.down ? addr_q - 1'b1 : addr_q + 1'b1;
        end else if (elem_q == 3'(N_ELEM - 1)) begin
          run_q  <= 1'b0;
          done_o <= 1'b1;
        end else begin
          elem_q <= elem_q + 1'b1;
          addr_q <= first_addr;
        end
      end
    end
  end

  assign bist_en_o = run_q || cmp_q;
  assign re_o      = run_q && !op_wr;
  assign we_o      = run_q && op_wr;
  assign addr_o    = addr_q;
  assign wdata_o   = {WIDTH{op_val}};
  assign busy_o    = run_q || cmp_q;
  assign fail_o    = |fail_mask_o;

endmodule
