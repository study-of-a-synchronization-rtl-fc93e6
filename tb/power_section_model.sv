// power_section_model: behavioural model of the power section that the
// inverter controllers drive (bridges, line impedances and the shared load).
// It is a testbench model, not synthesizable logic.
//
// Bridge k turns its 0/1 gate signal into +VDC/2 or -VDC/2. Each bridge
// feeds the common load node through a line impedance R + jwL (equal for
// all inverters); the load is R0 in series with L0. With equal lines the
// load voltage follows algebraically from the bridge voltages:
//   V0 * (1 + N*L0/L) = R0*I0 + (L0/L) * (sum(E) - R*I0),  I0 = sum(i_k)
// and every line current is then integrated with a fixed step DT_NS:
//   L * di_k/dt = E_k - R*i_k - V0.
// Because R*i is tiny next to the bridge voltages, the currents are almost
// exactly piecewise linear and forward Euler is accurate at 0.1 ns steps.
//
// `i_line[k]` is the output current of inverter k, `i_load` the load
// current, `v_load` the load voltage; all start from an equal share of
// I_START (the steady operating point of the load).
`timescale 1ns / 1fs
module power_section_model #(
  parameter int  N       = 2,
  parameter real VDC     = 600.0,
  parameter real R_LINE  = 1.0e-3,
  parameter real L_LINE  = 250.0e-9,
  parameter real R_LOAD  = 1.0e-3,
  parameter real L_LOAD  = 1.0e-3,
  parameter real I_START = 10.0,
  parameter real DT_NS   = 0.1
) (
  input  logic [N-1:0] gate,
  output real          i_line [N],
  output real          i_load,
  output real          v_load
);

  real e [N];

  initial begin
    for (int k = 0; k < N; k++) i_line[k] = I_START / N;
    i_load = I_START;
    v_load = 0.0;
    forever begin
      real sum_e, i0, v0, ratio;
      #(DT_NS);
      sum_e = 0.0;
      i0    = 0.0;
      for (int k = 0; k < N; k++) begin
        e[k]  = gate[k] ? VDC / 2.0 : -VDC / 2.0;
        sum_e = sum_e + e[k];
        i0    = i0 + i_line[k];
      end
      ratio = L_LOAD / L_LINE;
      v0 = (R_LOAD * i0 + ratio * (sum_e - R_LINE * i0)) / (1.0 + N * ratio);
      i0 = 0.0;
      for (int k = 0; k < N; k++) begin
        i_line[k] = i_line[k] + (e[k] - R_LINE * i_line[k] - v0) / L_LINE * (DT_NS * 1.0e-9);
        i0 = i0 + i_line[k];
      end
      i_load = i0;
      v_load = v0;
    end
  end

endmodule
