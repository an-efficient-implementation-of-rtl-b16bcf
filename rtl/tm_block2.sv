// tm_block2: second array of the tri-matrix multiplier, M = W * Z.
//
// N x N PE_2 MAC units; PE(i,j) accumulates M[i][j] = sum_k W[i][k]*Z[k][j].
// W arrives from the first array's output data buffer into this array's
// input data buffer (a tm_buffer); Z is held in a coefficient register
// loaded with z_load. When all N products have been added in every PE, the
// input buffer is released (so the next W can enter) and the N x N totals
// go to the output data buffer. Two operand schedules are built:
//
//   SYSTOLIC = 1 (default): a two-dimensional systolic array. W enters at
//   the left edge of each row and moves one PE to the right per clock; Z
//   enters at the top of each column and moves one PE down per clock. Row i
//   is fed W[i][t-i] and column j is fed Z[t-j][j] at clock t, so PE(i,j)
//   meets the matching pair W[i][k], Z[k][j] at t = k + i + j. A valid and
//   a first flag travel with W and tell each PE when to multiply and when
//   to restart its sum. A product takes 3N-2 clocks.
//   SYSTOLIC = 0: operands are broadcast. In step k every PE of row i gets
//   W[i][k] and every PE of column j gets Z[k][j]; a product takes N clocks.
//
// Interface: z_load/z_in load Z (hold it steady while products run);
// w_valid/w_ready/w_in take a W matrix; m_valid/m_ready/m_out present M.
// Timing: a W held in the input buffer starts at once if the PEs are free,
// and M is in the output buffer two cycles after the last MAC step: a lone
// W gives its M 3N cycles (systolic) or N+2 cycles (broadcast) after it is
// accepted, and one product is finished every 3N-2 or N clocks when busy.
// Widths: W A_W bits, Z DATA_W bits, M exact, all signed.
// The source design calls the arrays systolic but gives no schedule; both
// schedules above, the one-product-at-a-time operation and the handshakes
// are this design's choices. Reset is synchronous, active high.
module tm_block2 #(
  parameter int unsigned N        = mm_pkg::TM_N,
  parameter int unsigned DATA_W   = mm_pkg::TM_DATA_W,
  parameter int unsigned A_W      = 2 * DATA_W,
  parameter bit          SYSTOLIC = 1'b1,
  localparam int unsigned M_W     = mm_pkg::sum_width(A_W, DATA_W, N),
  localparam int unsigned STEPS   = SYSTOLIC ? 3 * N - 2 : N,
  localparam int unsigned T_W     = (STEPS > 1) ? $clog2(STEPS) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     z_load,
  input  logic signed [DATA_W-1:0] z_in  [N][N],
  input  logic                     w_valid,
  output logic                     w_ready,
  input  logic signed [A_W-1:0]    w_in  [N][N],
  output logic                     m_valid,
  input  logic                     m_ready,
  output logic signed [M_W-1:0]    m_out [N][N]
);

  typedef logic signed [A_W-1:0] w_t;
  typedef logic signed [DATA_W-1:0] z_t;
  typedef logic signed [M_W-1:0] m_t;

  z_t                       z_q [N][N];
  w_t                       w_q [N][N];
  m_t                       acc [N][N];
  logic                     ib_valid, ib_pop;
  logic                     ob_in_ready;
  logic                     running, res_valid;
  logic [T_W-1:0]           t_q, t_cur;
  logic                     step, last_step;

  // operands and control presented to each PE
  logic                     pe_en    [N][N];
  logic                     pe_first [N][N];
  w_t                       pe_a     [N][N];
  z_t                       pe_b     [N][N];

  always_ff @(posedge clk)
    if (rst) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) z_q[r][c] <= '0;
    end else if (z_load) begin
      z_q <= z_in;
    end

  tm_buffer #(.ROWS(N), .COLS(N), .T(w_t)) u_ibuf (
    .clk, .rst,
    .in_valid(w_valid), .in_ready(w_ready), .in_data(w_in),
    .out_valid(ib_valid), .out_ready(ib_pop), .out_data(w_q)
  );

  // A product may start when a W is waiting and the previous totals have
  // left, or leave in this very cycle. t counts the clocks of a product.
  assign step      = running || (ib_valid && (!res_valid || ob_in_ready));
  assign t_cur     = running ? t_q : '0;
  assign last_step = step && (t_cur == T_W'(STEPS - 1));
  assign ib_pop    = last_step;

  always_ff @(posedge clk) begin
    if (rst) begin
      running   <= 1'b0;
      t_q       <= '0;
      res_valid <= 1'b0;
    end else begin
      if (res_valid && ob_in_ready) res_valid <= 1'b0;
      if (last_step) begin
        running   <= 1'b0;
        t_q       <= '0;
        res_valid <= 1'b1;
      end else if (step) begin
        running <= 1'b1;
        t_q     <= t_cur + 1'b1;
      end
    end
  end

  if (SYSTOLIC) begin : g_systolic
    // Edge feeders: row i gets W[i][t-i], column j gets Z[t-j][j].
    w_t   edge_a [N];
    z_t   edge_b [N];
    logic edge_v [N];
    logic edge_f [N];
    // Registers between neighbouring PEs: the W operand (with its flags)
    // moving right and the Z operand moving down.
    w_t   a_q [N][N];
    logic v_q [N][N];
    logic f_q [N][N];
    z_t   b_q [N][N];

    always_comb begin
      for (int r = 0; r < N; r++) begin
        int k;
        k = int'(t_cur) - r;
        edge_v[r] = step && (k >= 0) && (k < int'(N));
        edge_f[r] = edge_v[r] && (k == 0);
        if (!edge_v[r]) k = 0;
        edge_a[r] = edge_v[r] ? w_q[r][k] : '0;
        edge_b[r] = edge_v[r] ? z_q[k][r] : '0;
      end
    end

    always_comb begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          pe_a[r][c]     = (c == 0) ? edge_a[r] : a_q[r][c];
          pe_en[r][c]    = (c == 0) ? edge_v[r] : v_q[r][c];
          pe_first[r][c] = (c == 0) ? edge_f[r] : f_q[r][c];
          pe_b[r][c]     = (r == 0) ? edge_b[c] : b_q[r][c];
        end
    end

    // a_q[r][c] / b_q[r][c] hold what PE(r,c) receives from its left / upper
    // neighbour; column 0 and row 0 entries are unused.
    always_ff @(posedge clk) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          if (rst) begin
            a_q[r][c] <= '0;
            v_q[r][c] <= 1'b0;
            f_q[r][c] <= 1'b0;
            b_q[r][c] <= '0;
          end else begin
            if (c > 0) begin
              a_q[r][c] <= pe_a[r][c-1];
              v_q[r][c] <= pe_en[r][c-1];
              f_q[r][c] <= pe_first[r][c-1];
            end
            if (r > 0) b_q[r][c] <= pe_b[r-1][c];
          end
        end
    end
  end else begin : g_broadcast
    always_comb begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          pe_en[r][c]    = step;
          pe_first[r][c] = (t_cur == '0);
          pe_a[r][c]     = w_q[r][t_cur];
          pe_b[r][c]     = z_q[t_cur][c];
        end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      tm_pe2 #(.A_W(A_W), .B_W(DATA_W), .N(N), .ACC_W(M_W)) u_pe (
        .clk, .rst, .en(pe_en[i][j]), .first(pe_first[i][j]),
        .a(pe_a[i][j]), .b(pe_b[i][j]), .acc(acc[i][j])
      );
    end
  end

  tm_buffer #(.ROWS(N), .COLS(N), .T(m_t)) u_obuf (
    .clk, .rst,
    .in_valid(res_valid), .in_ready(ob_in_ready), .in_data(acc),
    .out_valid(m_valid), .out_ready(m_ready), .out_data(m_out)
  );

  // The totals are never overwritten before the output buffer has them.
  assert property (@(posedge clk) disable iff (rst)
                   step && !running |-> !res_valid || ob_in_ready);

endmodule
