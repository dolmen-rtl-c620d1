// Event counters shared by the probes the system testbenches bind into the
// design (see tb_probe).
package tb_stats_pkg;
  localparam int N_EV = 8;
  int unsigned cnt [N_EV];
endpackage
