// vcxt: virtual circuit translation table at the input side of a switch.
//
// A cell arriving with virtual circuit identifier VCI i reads entry i, which
// gives the outgoing VCI and the resource management index (RMI) j that
// selects the circuit's entry in the buffer allocation table at the output
// buffer.  Predictable circuits are given the reserved RMI 0.  An entry also
// holds a valid bit; a cell on an unknown VCI comes out with lk_valid low.
// Interface: lookup is combinational (lk_vci in, lk_* out in the same clock);
// the caller registers the result.  wr_en writes one entry per clock.  The
// valid bits are cleared by reset; the other fields are written before use.
// Following the source: the VCI -> (VCI, RMI) translation and RMI 0 for
// predictable circuits.  This design's own: the table depth (2^VCI_W, a
// parameter; the source gives none), the valid bit and the write port.
module vcxt #(
  parameter int unsigned VCI_W = 10,
  parameter int unsigned RMI_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // table maintenance (control processor)
  input  logic             wr_en,
  input  logic [VCI_W-1:0] wr_vci,
  input  logic             wr_valid,
  input  logic [VCI_W-1:0] wr_vci_out,
  input  logic [RMI_W-1:0] wr_rmi,
  // lookup
  input  logic [VCI_W-1:0] lk_vci,
  output logic             lk_valid,
  output logic [VCI_W-1:0] lk_vci_out,
  output logic [RMI_W-1:0] lk_rmi
);

  localparam int unsigned DEPTH = 1 << VCI_W;

  logic             valid_q [DEPTH];
  logic [VCI_W-1:0] vci_q   [DEPTH];
  logic [RMI_W-1:0] rmi_q   [DEPTH];

  assign lk_valid   = valid_q[lk_vci];
  assign lk_vci_out = vci_q[lk_vci];
  assign lk_rmi     = rmi_q[lk_vci];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) valid_q[i] <= 1'b0;
    end else if (wr_en) begin
      valid_q[wr_vci] <= wr_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      vci_q[wr_vci] <= wr_vci_out;
      rmi_q[wr_vci] <= wr_rmi;
    end
  end

endmodule
