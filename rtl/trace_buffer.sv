// trace_buffer -- on-chip trace memory, W bits wide and DEPTH rows deep.
//
// While we_i is high one row (the dumped bits of all trace slots and scan
// chains) is written per clock cycle at the write pointer, which wraps
// around, so after an overflow the buffer keeps the latest DEPTH rows as a
// circular history. clr_i (synchronous) empties the buffer for a new run.
// When recording ends the contents are read through a separate read port.
//
// Interface and timing:
//   we_i / wdata_i        write of one row at the rising edge
//   wr_ptr_o              address of the next row to be written; once
//                         wrapped_o is set it is also the oldest row kept
//   wrapped_o             at least DEPTH rows were written since clr_i
//   rows_o                rows written since clr_i (wraps at 2^32)
//   rd_en_i / rd_addr_i   read request; rd_data_o and rd_valid_o follow one
//                         cycle later (synchronous-read memory)
//
// The width and the depth of 4k rows are the buffer sizes used for
// evaluation (8x4k, 16x4k, 32x4k). The circular write, the clear and the
// separate read port are choices of this design. The memory array is not
// reset, as in an SRAM macro.
module trace_buffer #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr_i,
  input  logic          we_i,
  input  logic [W-1:0]  wdata_i,
  output logic [AW-1:0] wr_ptr_o,
  output logic          wrapped_o,
  output logic [31:0]   rows_o,
  input  logic          rd_en_i,
  input  logic [AW-1:0] rd_addr_i,
  output logic [W-1:0]  rd_data_o,
  output logic          rd_valid_o
);

  logic [W-1:0] mem [DEPTH];

  logic [AW-1:0] wr_ptr;
  logic          wrapped;
  logic [31:0]   rows;
  logic          last;

  assign last = (wr_ptr == AW'(DEPTH - 1));

  always_ff @(posedge clk) begin
    if (we_i && !clr_i) mem[wr_ptr] <= wdata_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      wrapped <= 1'b0;
      rows    <= '0;
    end else if (clr_i) begin
      wr_ptr  <= '0;
      wrapped <= 1'b0;
      rows    <= '0;
    end else if (we_i) begin
      wr_ptr  <= last ? '0 : wr_ptr + 1'b1;
      wrapped <= wrapped | last;
      rows    <= rows + 32'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en_i) rd_data_o <= mem[rd_addr_i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid_o <= 1'b0;
    else        rd_valid_o <= rd_en_i;
  end

  // With a power-of-two depth the write pointer is the low bits of the row
  // count; any other relation means a row was lost or written twice.
  if ((DEPTH & (DEPTH - 1)) == 0 && DEPTH > 1) begin : g_ptr_check
    a_ptr_matches_rows: assert property (@(posedge clk) disable iff (!rst_n)
      wr_ptr == rows[AW-1:0]);
  end

  assign wr_ptr_o  = wr_ptr;
  assign wrapped_o = wrapped;
  assign rows_o    = rows;

endmodule
