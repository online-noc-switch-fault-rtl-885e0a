// trapped_packet_detector: the trapped packet detection hardware of a
// processor.
//
// A switch stuck at its processor port hands every packet to its own
// processor, where the packet is trapped. The detector watches the link
// from the switch's local output port into the processor and compares the
// destination of each arriving packet (its head flit) with the XY location
// of the related switch. A mismatch is a stuck-at-processor fault. The
// fault cannot be located or reported through the network, so the result
// is only a flag: `trap_evt` pulses for the cycle the bad head flit is
// accepted and `trap_err` stays set until reset.
//
// Interface: monitors valid/ready/flit of the ejection link, adds no delay
// to it. `enable` low turns the method off. Detection is registered, one
// cycle after the head flit is accepted.
module trapped_packet_detector
  import noc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   enable,
  input  coord_t sw,        // location of the related switch
  input  logic   valid,
  input  logic   ready,
  input  flit_t  flit,
  output logic   trap_evt,
  output logic   trap_err
);
  header_t hdr;
  logic    mismatch;

  assign hdr      = header_t'(flit.data);
  assign mismatch = enable && valid && ready && flit.head && (hdr.dst != sw);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trap_evt <= 1'b0;
      trap_err <= 1'b0;
    end else begin
      trap_evt <= mismatch;
      if (mismatch) trap_err <= 1'b1;
    end
  end

endmodule
