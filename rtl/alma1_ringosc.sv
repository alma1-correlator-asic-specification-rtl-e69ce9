// alma1_ringosc -- behavioural model of the process-monitor ring oscillator.
//
// This is a simulation model, not synthesizable logic: the real part is an
// odd chain of inverters whose frequency measures the speed of the silicon.
// While en (the PGM STB pin) is high the output toggles every HALF time
// units of the simulator; while en is low it rests at 0.  HALF is an
// arbitrary model value; the specification gives no frequency.
//
// Synthesis tools report a combinational logic loop here (osc feeds back
// into itself through the inverter).  That loop is the oscillator itself,
// so the warning stands; in silicon the part is a hand-placed cell.
module alma1_ringosc #(
  parameter int unsigned HALF = 2
) (
  input  logic en,
  output logic ringosc
);

  logic osc;


  always begin
    #(HALF);
    osc = en ? ~osc : 1'b0;
  end

  assign ringosc = osc;

endmodule
