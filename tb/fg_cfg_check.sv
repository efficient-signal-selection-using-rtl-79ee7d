// fg_cfg_check -- runs one trace buffer configuration of the fine-grained
// debug architecture through a full recording and checks every buffer entry.
//
// The configuration (buffer width, trace slots, partitions, step function,
// depth) is given by parameters. The checker drives random values on all
// observed flip-flops, records DEPTH+100 rows so that the buffer overflows,
// stops, reads the whole buffer back and compares each column with the
// expected dump (position n mod L of the chain, captured in row
// n - (n mod L)). Chain lengths and offsets are worked out here from the
// partitioning rules. done_o rises when the run is over; checks_o and
// failures_o then hold the counts.
module fg_cfg_check
  import fg_debug_pkg::*;
#(
  parameter int       BW      = 8,
  parameter int       OMEGA   = 2,
  parameter int       ALPHA   = 3,
  parameter step_op_e STEP_OP = STEP_MUL,
  parameter int       STEP_K  = 2,
  parameter int       DEPTH   = 4096,
  parameter string    NAME    = "cfg"
) (
  input  logic clk,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int NROWS = DEPTH + 100;

  function automatic int len_of(int c);
    int l;
    if (c < OMEGA) return 1;
    l = 1;
    for (int p = 0; p <= (c - OMEGA) / ((BW - OMEGA) / ALPHA); p++)
      l = (STEP_OP == STEP_MUL) ? l * STEP_K : l + STEP_K;
    return l;
  endfunction

  function automatic int total_sig();
    int s;
    s = 0;
    for (int c = 0; c < BW; c++) s += len_of(c);
    return s;
  endfunction

  localparam int N_SIG = total_sig();

  logic rst_n = 1'b0;
  logic start, stop, rd_en, capturing, wrapped, rd_valid;
  logic [N_SIG-1:0] sig;
  logic [AW-1:0] wr_ptr, rd_addr;
  logic [31:0] rows;
  logic [BW-1:0] rd_data;

  fg_debug_top #(.BW(BW), .OMEGA(OMEGA), .ALPHA(ALPHA), .STEP_OP(STEP_OP),
                 .STEP_K(STEP_K), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .stop_i(stop), .sig_i(sig),
    .capturing_o(capturing), .wr_ptr_o(wr_ptr), .wrapped_o(wrapped), .rows_o(rows),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data), .rd_valid_o(rd_valid)
  );

  logic [N_SIG-1:0] hist [NROWS];
  int len [BW];
  int ofs [BW];

  task automatic check(string what, longint got, longint exp);
    checks_o++;
    if (got != exp) begin
      failures_o++;
      if (failures_o < 10) $display("%s %s: got %0d expected %0d", NAME, what, got, exp);
    end
  endtask

  initial begin
    int o, n, ph;
    done_o = 0; checks_o = 0; failures_o = 0;
    start = 0; stop = 0; rd_en = 0; rd_addr = '0; sig = '0;
    o = 0;
    for (int c = 0; c < BW; c++) begin
      len[c] = len_of(c);
      ofs[c] = o;
      o += len[c];
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    for (int i = 0; i < NROWS; i++) begin
      @(negedge clk);
      for (int b = 0; b < N_SIG; b++) sig[b] = 1'($urandom);
      stop = (i == NROWS - 1);
      hist[i] = sig;
      @(posedge clk);
    end
    @(negedge clk);
    stop = 1'b0;
    check("rows", rows, NROWS);
    check("wrapped", wrapped, 1);
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      rd_en = 1'b1;
      rd_addr = AW'(a);
      @(negedge clk);
      rd_en = 1'b0;
      n = int'(rows) - DEPTH + ((a - int'(wr_ptr) + DEPTH) % DEPTH);
      for (int c = 0; c < BW; c++) begin
        ph = n % len[c];
        check($sformatf("row %0d col %0d", n, c), rd_data[c], hist[n - ph][ofs[c] + ph]);
      end
    end
    $display("%s: %0d observed flip-flops, %0d checks, %0d failures", NAME, N_SIG,
             checks_o, failures_o);
    done_o = 1'b1;
  end
endmodule
