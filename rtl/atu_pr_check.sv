// atu_pr_check: access-protection decision for one segment.
//
// Combinational. From the segment's two PR bits, the processor mode and the
// access type it decides whether the access is allowed, following the
// design's access-mode table:
//   PR  supervisor  user
//   00  RW          RW
//   01  RW          RO
//   10  RW          none
//   11  RO          none
// An instruction fetch is presented as a read (write = 0); the table has no
// separate execute right, so that mapping is this implementation's choice.
module atu_pr_check
  import atu_pkg::*;
(
  input  pr_t  pr,
  input  logic supervisor,
  input  logic write,
  output logic allowed
);

  always_comb begin
    unique case (pr)
      2'b00:   allowed = 1'b1;
      2'b01:   allowed = supervisor || !write;
      2'b10:   allowed = supervisor;
      default: allowed = supervisor && !write;
    endcase
  end

endmodule
