// scan_partition -- one partition of the trace buffer width: NCH scan chains
// of identical length LEN sharing one dump-phase counter.
//
// The phase counter counts recorded cycles modulo LEN. Phase 0 is the capture
// cycle of every chain in the partition; the chains then dump one shadow
// value per recorded cycle. Because all chains of a partition have the same
// period, one counter serves all of them. With LEN = 1 the partition is the
// set of trace slots and needs no counter.
//
// Interface: sig_i holds NCH*LEN selected signals, chain j using
// sig_i[j*LEN +: LEN]; dump_o[j] is chain j's bit of the current buffer row.
// clr_i (synchronous) returns the phase to 0 so that the first recorded row
// after a start is a capture row; adv_i advances the phase and the chains by
// one recorded cycle. cap_o shows that the current cycle is a capture cycle.
//
// Grouping the chains by partition follows the partitioning scheme; a shared
// counter per partition and the clear/advance handshake are choices of this
// design.
module scan_partition #(
  parameter int unsigned NCH = 2,
  parameter int unsigned LEN = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr_i,
  input  logic               adv_i,
  input  logic [NCH*LEN-1:0] sig_i,
  output logic [NCH-1:0]     dump_o,
  output logic               cap_o
);

  if (LEN == 1) begin : g_trace
    assign cap_o = 1'b1;
  end else begin : g_phase
    localparam int unsigned PW = $clog2(LEN);
    logic [PW-1:0] phase;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      phase <= '0;
      else if (clr_i)  phase <= '0;
      else if (adv_i)  phase <= (phase == PW'(LEN - 1)) ? '0 : phase + 1'b1;
    end

    assign cap_o = (phase == '0);
  end

  for (genvar j = 0; j < NCH; j++) begin : g_chain
    scan_chain #(.LEN(LEN)) u_chain (
      .clk   (clk),
      .rst_n (rst_n),
      .adv_i (adv_i),
      .cap_i (cap_o),
      .sig_i (sig_i[j*LEN +: LEN]),
      .dump_o(dump_o[j])
    );
  end

endmodule
