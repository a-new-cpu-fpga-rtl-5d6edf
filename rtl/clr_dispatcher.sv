// clr_dispatcher: hands the lists of one CLR row to the FFCSR reading
// threads.
//
// A row carries K offset ids; slots 0..nlists-1 are in use and slot j is
// read with edge selector sel[j] (predicate and direction of the query edge
// that joins the new query node to the j-th matched vertex). Each slot is
// assigned by its offset id: the preferred thread is oid mod NT. If that
// thread is busy or already took a slot this cycle, the slot goes to the
// lowest free thread instead (counted as a redirect), so all lists of a row
// are fetched in parallel when NT >= nlists. Several slots may be issued in
// one cycle. A slot is issued only when no thread is still reading the
// previous list of the same slot, so each slot buffer receives its lists in
// row order, while the lists of consecutive rows overlap in time. The next
// row is taken once every slot of the current row has been issued. With NT >= nlists a slot always finds a thread, so the pipeline
// cannot stall for want of one. The redirect rule and the per-slot
// ordering rule are this design's choices.
module clr_dispatcher
  import gstore_pkg::*;
#(
  parameter int unsigned K  = NUM_DDR,
  parameter int unsigned NT = NUM_DDR,
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [SW:0]               nlists,
  input  edge_sel_t [K-1:0]         sel,
  // rows from the CLR reader
  input  logic                      row_valid,
  output logic                      row_ready,
  input  logic [K-1:0][VID_W-1:0]   row_oid,
  // tasks to the threads
  output logic      [NT-1:0]        task_valid,
  input  logic      [NT-1:0]        task_ready,
  output logic      [NT-1:0][SW-1:0] task_slot,
  output list_key_t [NT-1:0]        task_key,
  output logic                      busy,     // a row is held
  output logic                      ev_redirect
);
  logic                    loaded;
  logic [K-1:0]            pending, issued_now;
  logic [K-1:0][VID_W-1:0] oid;
  logic [NT-1:0]           taken;
  logic                    row_done;
  logic [NT-1:0][SW-1:0]   owner;      // slot each thread is working on
  logic [K-1:0]            slot_busy;

  always_comb begin
    slot_busy = '0;
    for (int t = 0; t < NT; t++)
      if (!task_ready[t]) slot_busy[owner[t]] = 1'b1;
  end

  always_comb begin
    int unsigned pref;
    int          pick;
    task_valid  = '0;
    task_slot   = '0;
    task_key    = '0;
    taken       = '0;
    issued_now  = '0;
    ev_redirect = 1'b0;
    for (int j = 0; j < K; j++) begin
      pref = int'(oid[j] % VID_W'(NT));
      pick = -1;
      if (loaded && pending[j] && !slot_busy[j]) begin
        if (task_ready[pref] && !taken[pref]) begin
          pick = int'(pref);
        end else begin
          for (int t = NT-1; t >= 0; t--)
            if (task_ready[t] && !taken[t]) pick = t;
          if (pick >= 0) ev_redirect = 1'b1;
        end
        if (pick >= 0) begin
          taken[pick]      = 1'b1;
          task_valid[pick] = 1'b1;
          task_slot[pick]  = SW'(j);
          task_key[pick]   = '{pid: sel[j].pid, dir: sel[j].dir, oid: oid[j]};
          issued_now[j]    = 1'b1;
        end
      end
    end
  end

  assign row_done  = loaded && (pending == '0);
  assign row_ready = !loaded;
  assign busy      = loaded;

  always_ff @(posedge clk) begin
    if (rst) begin
      loaded  <= 1'b0;
      pending <= '0;
      oid     <= '0;
      owner   <= '0;
    end else begin
      for (int t = 0; t < NT; t++)
        if (task_valid[t] && task_ready[t]) owner[t] <= task_slot[t];
      if (!loaded) begin
        if (row_valid) begin
          loaded <= 1'b1;
          oid    <= row_oid;
          for (int j = 0; j < K; j++) pending[j] <= (j < int'(nlists));
        end
      end else begin
        pending <= pending & ~issued_now;
        if (row_done) loaded <= 1'b0;
      end
    end
  end
endmodule
