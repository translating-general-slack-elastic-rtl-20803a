// Slack-elastic handling of repeated channel actions: three example systems
// side by side.
//
// A process that uses the same channel at several points of one loop
// iteration cannot be turned into a static dataflow graph directly. The
// method implemented here gives each use its own replica channel, joins the
// replicas with ordinary MERGE (for outputs) or SPLIT (for inputs) elements,
// and computes the control tokens for those elements at run time with small
// deterministic processes (SEQ, IF0/IF1, SEL, LOOP_C) built bottom-up over
// the program's structure from one-bit "access sequences". Nothing in the
// result depends on arrival order, so any channel may be given extra
// buffering without changing what the circuit computes.
//
// The three systems are independent and have their own ports:
//   fig6_system  a program reading channel A up to four times per iteration
//                inside a loop and a selection (ports a_*, b_*, res_*);
//   ex1_system   a stateful multiply-accumulate unit (FMADD) shared by three
//                call sites in sequence (ports e1_*);
//   ex2_system   the same unit shared by two call sites under guards
//                (ports e2_*);
//   ex3_system   the same unit shared by a guarded call site and a call
//                site in a loop inside a selection (ports e3_*).
// All channels are valid/ready/data: a token moves on a rising clock edge
// where valid and ready are both high. Reset is synchronous, active high.
module slack_elastic_top #(
  parameter int unsigned W          = 32,
  parameter int unsigned CTRL_SLACK = 1
) (
  input  logic                 clk,
  input  logic                 rst,
  // Repeated input channel example
  input  logic                 a_valid,
  output logic                 a_ready,
  input  logic [W-1:0]         a_data,
  input  logic                 b_valid,
  output logic                 b_ready,
  input  logic [W-1:0]         b_data,
  output logic                 res_valid,
  input  logic                 res_ready,
  output logic [W-1:0]         res_data,
  output logic [31:0]          sink_count,
  // EXAMPLE_1: FMADD shared by three sequential call sites
  input  logic [2:0]           e1_in_valid,
  output logic [2:0]           e1_in_ready,
  input  logic [2:0][2*W-1:0]  e1_in_data,
  output logic                 e1_res_valid,
  input  logic                 e1_res_ready,
  output logic [W-1:0]         e1_res_data,
  output logic [31:0]          e1_sink_count,
  // EXAMPLE_2: FMADD shared by two conditional call sites
  input  logic                 e2_x_valid,
  output logic                 e2_x_ready,
  input  logic [2*W+2:0]       e2_x_data,
  output logic                 e2_res_valid,
  input  logic                 e2_res_ready,
  output logic [W-1:0]         e2_res_data,
  output logic [31:0]          e2_sink_count,
  // EXAMPLE_3: FMADD shared by a guarded call site and a guarded loop
  input  logic                 e3_g0_valid,
  output logic                 e3_g0_ready,
  input  logic                 e3_g0_data,
  input  logic                 e3_g1_valid,
  output logic                 e3_g1_ready,
  input  logic                 e3_g1_data,
  input  logic                 e3_ab_valid,
  output logic                 e3_ab_ready,
  input  logic [2*W-1:0]       e3_ab_data,
  input  logic                 e3_g2_valid,
  output logic                 e3_g2_ready,
  input  logic                 e3_g2_data,
  output logic                 e3_res_valid,
  input  logic                 e3_res_ready,
  output logic [W-1:0]         e3_res_data,
  output logic [31:0]          e3_sink_count
);

  fig6_system #(.W(W), .CTRL_SLACK(CTRL_SLACK)) u_fig6 (
    .clk, .rst,
    .a_valid, .a_ready, .a_data,
    .b_valid, .b_ready, .b_data,
    .res_valid, .res_ready, .res_data,
    .sink_count
  );

  ex1_system #(.W(W), .CTRL_SLACK(CTRL_SLACK)) u_ex1 (
    .clk, .rst,
    .in_valid(e1_in_valid), .in_ready(e1_in_ready), .in_data(e1_in_data),
    .res_valid(e1_res_valid), .res_ready(e1_res_ready), .res_data(e1_res_data),
    .sink_count(e1_sink_count)
  );

  ex2_system #(.W(W)) u_ex2 (
    .clk, .rst,
    .x_valid(e2_x_valid), .x_ready(e2_x_ready), .x_data(e2_x_data),
    .res_valid(e2_res_valid), .res_ready(e2_res_ready), .res_data(e2_res_data),
    .sink_count(e2_sink_count)
  );

  ex3_system #(.W(W)) u_ex3 (
    .clk, .rst,
    .g0_valid(e3_g0_valid), .g0_ready(e3_g0_ready), .g0_data(e3_g0_data),
    .g1_valid(e3_g1_valid), .g1_ready(e3_g1_ready), .g1_data(e3_g1_data),
    .ab_valid(e3_ab_valid), .ab_ready(e3_ab_ready), .ab_data(e3_ab_data),
    .g2_valid(e3_g2_valid), .g2_ready(e3_g2_ready), .g2_data(e3_g2_data),
    .res_valid(e3_res_valid), .res_ready(e3_res_ready), .res_data(e3_res_data),
    .sink_count(e3_sink_count)
  );

endmodule
