// ring_oscillator: behavioural model (not synthesizable) of one free-running
// ring of the TRNG.
//
// The ring is an AND gate followed by N_INV (three) programmable-delay
// inverters, the last one feeding back to the AND gate. With en low the AND
// output holds the ring at a stable state; with en high the odd number of
// inversions makes it oscillate. All inverters of the ring take the same 3-bit
// delay level 'code', so the ring's period changes with the level applied at
// each sample clock. The structure (one AND LUT, three inverter LUTs) follows
// the source design; sharing one code among the three inverters, the AND delay
// and the fixed per-ring MISMATCH_PS offset are this model's own choices.
//
// The closed loop is a deliberate combinational loop: it is the oscillator.
// Interface: en, code[2:0], ro_out. Time unit 1 ps. With default delays the
// period is about 2*(AND_PS + 3*(600 + 12*code + jitter)) ps, 4.8 to 5.3 ns.
`timescale 1ps/1ps
module ring_oscillator #(
  parameter int unsigned N_INV       = 3,
  parameter int unsigned AND_PS      = 600,
  parameter int unsigned BASE_PS     = 600,
  parameter int unsigned STEP_PS     = 12,
  parameter int unsigned JITTER_PS   = 10,
  parameter int unsigned MISMATCH_PS = 0
) (
  input  logic       en,
  input  logic [2:0] code,
  output logic       ro_out
);
  logic [N_INV:0] node;  // node[0] = AND output, node[i] = output of inverter i

  // Enable gate (one LUT): fixed delay, stable at 0 while disabled.
  always begin
    #(AND_PS + MISMATCH_PS);
    node[0] = en & node[N_INV];
    @(en or node[N_INV]);
  end

  for (genvar i = 0; i < N_INV; i++) begin : g_inv
    pdl_inverter #(
      .BASE_PS  (BASE_PS),
      .STEP_PS  (STEP_PS),
      .JITTER_PS(JITTER_PS)
    ) u_inv (
      .a   (node[i]),
      .ctrl(code),
      .y   (node[i+1])
    );
  end

  assign ro_out = node[N_INV];
endmodule
