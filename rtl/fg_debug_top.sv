// fg_debug_top -- fine-grained combination of trace and scan signals sharing
// one trace buffer.
//
// The BW columns of the trace buffer are shared by BW chains: OMEGA trace
// slots (length 1, recorded every cycle) and ALPHA partitions of
// (BW-OMEGA)/ALPHA shadow scan chains each. Partition p has chains of length
// l_p = phi(l_{p-1}) with l_0 = 1, where phi is STEP_K + x (STEP_ADD) or
// STEP_K * x (STEP_MUL). A chain of length L dumps each of its L signals
// every L cycles, so signals can be given any of ALPHA+1 dumping periods
// according to their importance. With the defaults (BW = 8, OMEGA = 2,
// ALPHA = 3, phi(i) = 2*phi(i-1)) there are 2 trace slots and two chains each
// of lengths 2, 4 and 8: 30 flip-flops are observed with an 8-bit buffer.
//
// sig_i carries the selected flip-flops, wired at design time in the order
// given by fg_debug_pkg::sig_offset: trace slots first, then the chains
// partition by partition; inside a chain, position k is dumped k cycles
// after the capture cycle. Buffer column c holds chain c.
//
// Control: a start_i pulse clears the buffer and all phase counters and
// starts recording with the next cycle; from then on one row is written per
// cycle. A stop_i pulse (e.g. an error trigger) ends recording after the row
// of that cycle. Recorded row n (counting from 0 after start) holds, in a
// column of length L, signal position (n mod L) as captured in row
// n - (n mod L). After an overflow the buffer keeps the last DEPTH rows; the
// row count rows_o and the write pointer wr_ptr_o let the reader recover n for
// every address. Readout is through rd_en_i / rd_addr_i with one cycle of
// latency.
//
// The partitioning, the chain lengths, the dumping periods and the buffer
// sizes follow the architecture as specified; the column order, the
// start/stop control and the readout port are choices of this design.
module fg_debug_top
  import fg_debug_pkg::*;
#(
  parameter int unsigned BW      = 8,
  parameter int unsigned OMEGA   = 2,
  parameter int unsigned ALPHA   = 3,
  parameter step_op_e    STEP_OP = STEP_MUL,
  parameter int unsigned STEP_K  = 2,
  parameter int unsigned DEPTH   = 4096,
  localparam int unsigned N_SIG  = num_signals(BW, OMEGA, ALPHA, STEP_OP, STEP_K),
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,
  input  logic             stop_i,
  input  logic [N_SIG-1:0] sig_i,
  output logic             capturing_o,
  output logic [AW-1:0]    wr_ptr_o,
  output logic             wrapped_o,
  output logic [31:0]      rows_o,
  input  logic             rd_en_i,
  input  logic [AW-1:0]    rd_addr_i,
  output logic [BW-1:0]    rd_data_o,
  output logic             rd_valid_o
);

  localparam int unsigned CPP = chains_per_part(BW, OMEGA, ALPHA);

  if (OMEGA > BW) begin : g_bad_omega
    $error("OMEGA must not exceed BW");
  end
  if (BW > OMEGA && (ALPHA == 0 || (BW - OMEGA) % ALPHA != 0)) begin : g_bad_alpha
    $error("BW-OMEGA must be a non-zero multiple of ALPHA");
  end

  // ---------------------------------------------------------------- control
  logic capturing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       capturing <= 1'b0;
    else if (start_i) capturing <= 1'b1;
    else if (stop_i)  capturing <= 1'b0;
  end

  logic adv, clr;
  assign clr = start_i;
  assign adv = capturing && !start_i;

  // ------------------------------------------------------- chains per column
  logic [BW-1:0] row;

  if (OMEGA > 0) begin : g_trace
    scan_partition #(.NCH(OMEGA), .LEN(1)) u_trace (
      .clk   (clk),
      .rst_n (rst_n),
      .clr_i (clr),
      .adv_i (adv),
      .sig_i (sig_i[OMEGA-1:0]),
      .dump_o(row[OMEGA-1:0]),
      .cap_o ()
    );
  end

  for (genvar p = 1; p <= int'(ALPHA) && BW > OMEGA; p++) begin : g_part
    localparam int unsigned LEN  = part_len(p, STEP_OP, STEP_K);
    localparam int unsigned COL0 = OMEGA + (p - 1) * CPP;
    localparam int unsigned OFS  = sig_offset(COL0, BW, OMEGA, ALPHA, STEP_OP, STEP_K);
    scan_partition #(.NCH(CPP), .LEN(LEN)) u_part (
      .clk   (clk),
      .rst_n (rst_n),
      .clr_i (clr),
      .adv_i (adv),
      .sig_i (sig_i[OFS +: CPP*LEN]),
      .dump_o(row[COL0 +: CPP]),
      .cap_o ()
    );
  end

  // ------------------------------------------------------------ trace buffer
  trace_buffer #(.W(BW), .DEPTH(DEPTH)) u_buf (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr_i     (clr),
    .we_i      (adv),
    .wdata_i   (row),
    .wr_ptr_o  (wr_ptr_o),
    .wrapped_o (wrapped_o),
    .rows_o    (rows_o),
    .rd_en_i   (rd_en_i),
    .rd_addr_i (rd_addr_i),
    .rd_data_o (rd_data_o),
    .rd_valid_o(rd_valid_o)
  );

  assign capturing_o = capturing;

endmodule
