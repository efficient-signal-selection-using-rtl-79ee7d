// tb_fg_debug_top -- end-to-end test of the fine-grained debug architecture
// at its default size (8-bit x 4096-row buffer, 2 trace slots, chains of
// length 2, 4 and 8, 30 observed flip-flops).
//
// The observed flip-flops are driven with random values every cycle and
// remembered per recorded row. The chain lengths and signal offsets are
// worked out here from the architecture's rules, independently of the RTL
// package. Two recording runs are made:
//   run 1: start, 300 rows, stop; the signals keep changing afterwards and
//          the buffer must stay frozen; all rows are read back;
//   run 2: restart, DEPTH+1000 rows so the buffer overflows, stop; all DEPTH
//          rows are read back and mapped to their recording cycle through
//          rows_o and wr_ptr_o.
// Every read row is compared column by column with the expected value: the
// signal at position (n mod L) of the chain, as it was in row n - (n mod L).
// The testbench counts how often each mechanism was exercised (trace slot
// dump, chain capture, shadow shift, overflow, freeze after stop, restart,
// one row per recorded cycle) and fails if one never happened.
module tb_fg_debug_top;
  // defaults of the design, restated
  localparam int BW = 8;
  localparam int OMEGA = 2;
  localparam int ALPHA = 3;
  localparam int STEP_K = 2;     // phi(i) = 2 * phi(i-1)
  localparam int DEPTH = 4096;
  localparam int AW = 12;
  localparam int N_SIG = 2 + 2*2 + 2*4 + 2*8;
  localparam int MAXROWS = DEPTH + 1000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start, stop, rd_en, capturing, wrapped, rd_valid;
  logic [N_SIG-1:0] sig;
  logic [AW-1:0] wr_ptr, rd_addr;
  logic [31:0] rows;
  logic [BW-1:0] rd_data;

  fg_debug_top dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .stop_i(stop), .sig_i(sig),
    .capturing_o(capturing), .wr_ptr_o(wr_ptr), .wrapped_o(wrapped), .rows_o(rows),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data), .rd_valid_o(rd_valid)
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // chain length and signal offset per column, from the partitioning rules
  int len [BW];
  int ofs [BW];
  initial begin
    int l, o, cpp;
    cpp = (BW - OMEGA) / ALPHA;
    o = 0;
    for (int c = 0; c < BW; c++) begin
      if (c < OMEGA) len[c] = 1;
      else begin
        l = 1;
        for (int p = 0; p <= (c - OMEGA) / cpp; p++) l = l * STEP_K;
        len[c] = l;
      end
      ofs[c] = o;
      o += len[c];
    end
  end

  logic [N_SIG-1:0] hist [MAXROWS];

  int n_trace, n_capture, n_shift, n_wrap, n_freeze, n_restart, n_rate;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one recording run of n rows; stop is raised with the last row
  task automatic record(int n);
    @(negedge clk);
    start = 1'b1;
    sig = N_SIG'({$urandom, $urandom});
    @(posedge clk);
    #1 start = 1'b0;
    n_restart++;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      sig = N_SIG'({$urandom, $urandom});
      stop = (i == n - 1);
      hist[i] = sig;
      @(posedge clk);
      #1;
      check("capturing", capturing, i != n - 1);
      check("rows", rows, i + 1);
      if (rows == i + 1) n_rate++;
    end
    @(negedge clk);
    stop = 1'b0;
  endtask

  task automatic check_row(int n, logic [BW-1:0] data);
    int ph;
    for (int c = 0; c < BW; c++) begin
      ph = n % len[c];
      check($sformatf("row %0d col %0d", n, c), data[c], hist[n - ph][ofs[c] + ph]);
      if (len[c] == 1)  n_trace++;
      else if (ph == 0) n_capture++;
      else              n_shift++;
    end
  endtask

  task automatic read_row(int a, output logic [BW-1:0] data);
    @(negedge clk);
    rd_en = 1'b1;
    rd_addr = AW'(a);
    @(negedge clk);
    rd_en = 1'b0;
    check("rd_valid", rd_valid, 1);
    data = rd_data;
  endtask

  initial begin
    logic [BW-1:0] d;
    int nrows, n;
    start = 0; stop = 0; rd_en = 0; rd_addr = '0; sig = '0;
    n_trace = 0; n_capture = 0; n_shift = 0; n_wrap = 0; n_freeze = 0;
    n_restart = 0; n_rate = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------------- run 1: short, no overflow, freeze after stop
    nrows = 300;
    record(nrows);
    repeat (50) begin
      @(negedge clk);
      sig = N_SIG'({$urandom, $urandom});
      @(posedge clk);
      #1;
      check("frozen rows", rows, nrows);
      check("frozen ptr", wr_ptr, nrows);
      if (rows == nrows && wr_ptr == nrows) n_freeze++;
    end
    check("no wrap", wrapped, 0);
    for (int a = 0; a < nrows; a++) begin
      read_row(a, d);
      check_row(a, d);
    end

    // ---------------- run 2: overflow
    nrows = MAXROWS;
    record(nrows);
    check("wrapped", wrapped, 1);
    check("ptr after wrap", wr_ptr, nrows % DEPTH);
    if (wrapped) n_wrap++;
    for (int a = 0; a < DEPTH; a++) begin
      read_row(a, d);
      n = int'(rows) - DEPTH + ((a - int'(wr_ptr) + DEPTH) % DEPTH);
      check_row(n, d);
    end

    $display("mechanisms: trace=%0d capture=%0d shift=%0d wrap=%0d freeze=%0d restart=%0d row_per_cycle=%0d",
             n_trace, n_capture, n_shift, n_wrap, n_freeze, n_restart, n_rate);
    checks++;
    if (n_trace == 0 || n_capture == 0 || n_shift == 0 || n_wrap == 0 ||
        n_freeze == 0 || n_restart < 2 || n_rate == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
