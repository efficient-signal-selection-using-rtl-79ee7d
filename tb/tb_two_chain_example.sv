// tb_two_chain_example -- the two-column example architecture, checked entry by
// entry against its trace buffer table.
//
// An 8-flip-flop example circuit (flip-flops A..H, driven here with random
// values) is observed through a 2-bit trace buffer with no trace slot and two
// partitions: phi(i) = 1 + phi(i-1) gives one chain of length 2 (holding A and
// C) and one of length 3 (holding B, D and E). Over cycles 1..8 the buffer
// must read
//   column 1: A1 C1 A3 C3 A5 C5 A7 C7
//   column 2: B1 D1 E1 B4 D4 E4 B7 D7
// where X_t is the value of flip-flop X in recorded cycle t.
module tb_two_chain_example;
  import fg_debug_pkg::*;

  localparam int NCYC = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start, stop, rd_en, capturing, wrapped, rd_valid;
  logic [4:0] sig;
  logic [5:0] wr_ptr, rd_addr;
  logic [31:0] rows;
  logic [1:0] rd_data;

  // flip-flops of the example circuit, index 0..7 = A..H
  logic [7:0] ff;
  assign sig = {ff[4], ff[3], ff[1], ff[2], ff[0]};   // E D B | C A

  fg_debug_top #(.BW(2), .OMEGA(0), .ALPHA(2), .STEP_OP(STEP_ADD), .STEP_K(1), .DEPTH(64)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .stop_i(stop), .sig_i(sig),
    .capturing_o(capturing), .wr_ptr_o(wr_ptr), .wrapped_o(wrapped), .rows_o(rows),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data), .rd_valid_o(rd_valid)
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] hist [1:NCYC];
  // expected entries: flip-flop letter and cycle per column and buffer cycle
  string col1_ff = "ACACACAC";
  int    col1_cy [NCYC] = '{1, 1, 3, 3, 5, 5, 7, 7};
  string col2_ff = "BDEBDEBD";
  int    col2_cy [NCYC] = '{1, 1, 1, 4, 4, 4, 7, 7};

  initial begin
    logic exp1, exp2;
    start = 0; stop = 0; rd_en = 0; rd_addr = '0; ff = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    for (int t = 1; t <= NCYC; t++) begin
      @(negedge clk);
      ff = 8'($urandom);
      stop = (t == NCYC);
      hist[t] = ff;
      @(posedge clk);
    end
    @(negedge clk);
    stop = 1'b0;
    checks++;
    if (rows != NCYC) begin
      failures++;
      $display("recorded %0d rows, expected %0d", rows, NCYC);
    end
    for (int t = 1; t <= NCYC; t++) begin
      @(negedge clk);
      rd_en = 1'b1;
      rd_addr = 6'(t - 1);
      @(negedge clk);
      rd_en = 1'b0;
      exp1 = hist[col1_cy[t-1]][col1_ff[t-1] - "A"];
      exp2 = hist[col2_cy[t-1]][col2_ff[t-1] - "A"];
      checks += 2;
      if (rd_data[0] !== exp1) begin
        failures++;
        $display("cycle %0d column 1: %b expected %s%0d = %b", t, rd_data[0],
                 col1_ff.substr(t-1, t-1), col1_cy[t-1], exp1);
      end
      if (rd_data[1] !== exp2) begin
        failures++;
        $display("cycle %0d column 2: %b expected %s%0d = %b", t, rd_data[1],
                 col2_ff.substr(t-1, t-1), col2_cy[t-1], exp2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
