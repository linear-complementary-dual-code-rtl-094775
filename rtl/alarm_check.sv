// alarm_check: the "differs?" comparator of the encoded circuit. It compares
// the mask decoded from the stored state (z*K) with the mask registered when
// that state was written. Any change of the stored state that is not a
// codeword of the data code C, in particular every change of fewer than
// d_Payload bits, and any change of the mask register make them differ and
// raise alarm. Purely combinational, so alarm is high in the same cycle as
// the faulty register contents, before the next edge writes them on.
module alarm_check #(
  parameter int R = 14
) (
  input  logic [R-1:0] y_decoded,
  input  logic [R-1:0] y_stored,
  output logic         alarm
);
  assign alarm = (y_decoded != y_stored);
endmodule
