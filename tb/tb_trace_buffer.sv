// tb_trace_buffer -- self-checking test of the circular trace memory.
//
// Uses a 16-row buffer so that wrap-around happens quickly. Rows are written
// with random gaps; a model in the testbench tracks the expected write
// pointer, wrap flag, row count and contents. After recording the whole
// buffer is read back and the one-cycle read latency is checked. A clear
// followed by a short run checks the restart.
module tb_trace_buffer;
  localparam int unsigned W = 8;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr, we, rd_en, wrapped, rd_valid;
  logic [W-1:0] wdata, rd_data;
  logic [AW-1:0] wr_ptr, rd_addr;
  logic [31:0] rows;

  int checks = 0;
  int failures = 0;

  trace_buffer #(.W(W), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .clr_i(clr), .we_i(we), .wdata_i(wdata),
    .wr_ptr_o(wr_ptr), .wrapped_o(wrapped), .rows_o(rows),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data), .rd_valid_o(rd_valid)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] model [DEPTH];
  int m_ptr, m_rows;
  bit m_wrapped;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic record(int n);
    int written;
    written = 0;
    while (written < n) begin
      @(negedge clk);
      we = ($urandom % 3) != 0;
      wdata = W'($urandom);
      @(posedge clk);
      if (we) begin
        model[m_ptr] = wdata;
        m_ptr = (m_ptr + 1) % DEPTH;
        if (m_ptr == 0) m_wrapped = 1;
        m_rows++;
        written++;
      end
      #1;
      check("wr_ptr", wr_ptr, m_ptr);
      check("wrapped", wrapped, m_wrapped);
      check("rows", rows, m_rows);
    end
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic readback(int n);
    for (int a = 0; a < n; a++) begin
      @(negedge clk);
      rd_en = 1'b1;
      rd_addr = AW'(a);
      @(negedge clk);
      rd_en = 1'b0;
      check("rd_valid", rd_valid, 1);
      check($sformatf("row %0d", a), rd_data, model[a]);
      @(negedge clk);
      check("rd_valid low", rd_valid, 0);
    end
  endtask

  initial begin
    clr = 0; we = 0; rd_en = 0; wdata = '0; rd_addr = '0;
    m_ptr = 0; m_rows = 0; m_wrapped = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    record(DEPTH + 7);                  // overflow: oldest rows replaced
    check("wrapped after overflow", wrapped, 1);
    readback(DEPTH);
    // clear and short run
    @(negedge clk);
    clr = 1'b1; we = 1'b1;
    @(posedge clk);
    #1;
    clr = 1'b0; we = 1'b0;
    m_ptr = 0; m_rows = 0; m_wrapped = 0;
    check("ptr after clear", wr_ptr, 0);
    check("rows after clear", rows, 0);
    check("wrapped after clear", wrapped, 0);
    record(5);
    readback(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
