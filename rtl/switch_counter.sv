// switch_counter: switch count field update of the switch count method.
//
// Every packet header carries a switch count field that each switch
// increments by one as the packet passes. A fault that keeps a packet
// moving back and forth between switches eventually makes the field
// overflow; the overflow is the evidence of the fault. This unit rewrites a
// header with the incremented count and raises `overflow` when the count
// wraps (the field was all ones). With `enable` low the header passes
// unchanged and no overflow is reported, which gives the configurations
// without the switch count method.
//
// Combinational. Field width SC_W (4 bits) is set in noc_pkg.
module switch_counter
  import noc_pkg::*;
(
  input  logic    enable,
  input  header_t hdr_in,
  output header_t hdr_out,
  output logic    overflow
);
  always_comb begin
    hdr_out  = hdr_in;
    overflow = 1'b0;
    if (enable) begin
      {overflow, hdr_out.sc} = {1'b0, hdr_in.sc} + (SC_W+1)'(1);
    end
  end

endmodule
