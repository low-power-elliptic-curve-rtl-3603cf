// bus_manager: system bus of the RFID processor.
//
// Connects two 8-bit bus masters, the EC processor and the microcontroller, to the
// slaves: ROM, RAM (both 10-bit byte address, 8-bit data), the random number generator
// and the RFID front end (receiver on reads, transmitter on writes). The bus widths
// (13-bit master address, 10-bit memory address, 8-bit data) are the design's; the
// arbitration, handshake and address map are this design's own choices:
//   addr[12:10] = 0 ROM, 1 RAM, 2 RNG, 3 front end; addr[9:0] byte address.
// A master holds req (with we, addr, wdata) until it sees ack; rdata is valid with ack.
// The EC processor has priority; a granted access is completed before another starts.
// Timing: ROM and RAM accesses take 2 cycles (address cycle, then ack with the data of
// the synchronous memory). RNG and front-end accesses are acknowledged in the cycle the
// device is ready (rng_valid, rx_valid, tx_ready); the device sees a one-cycle
// rng_ready, rx_ready or tx_valid strobe in that cycle.
module bus_manager
  import ecc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // masters: 0 = EC processor, 1 = microcontroller
  input  bus_req_t   ecp_req,
  output bus_rsp_t   ecp_rsp,
  input  bus_req_t   mcu_req,
  output bus_rsp_t   mcu_rsp,
  // ROM
  output logic       rom_en,
  output logic [9:0] rom_addr,
  input  logic [7:0] rom_rdata,
  // RAM
  output logic       ram_en,
  output logic       ram_we,
  output logic [9:0] ram_addr,
  output logic [7:0] ram_wdata,
  input  logic [7:0] ram_rdata,
  // random number generator
  input  logic [7:0] rng_data,
  input  logic       rng_valid,
  output logic       rng_ready,
  // front end: receiver and transmitter byte streams
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic       rx_ready,
  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready
);

  typedef enum logic {S_IDLE, S_ACK} state_e;
  state_e   state;
  logic     owner;          // master of the memory access in S_ACK
  logic     dev_rom_q;      // that access went to the ROM
  bus_req_t r;
  logic     g;              // granted master in S_IDLE
  logic     any;
  dev_e     dev;
  logic     io_ack;
  logic [7:0] io_data;

  always_comb begin
    any = ecp_req.req || mcu_req.req;
    g   = !ecp_req.req;
    r   = g ? mcu_req : ecp_req;
    dev = dev_e'(r.addr[12:10]);

    rom_en    = 1'b0;
    ram_en    = 1'b0;
    ram_we    = 1'b0;
    rom_addr  = r.addr[9:0];
    ram_addr  = r.addr[9:0];
    ram_wdata = r.wdata;
    rng_ready = 1'b0;
    rx_ready  = 1'b0;
    tx_valid  = 1'b0;
    tx_data   = r.wdata;
    io_ack    = 1'b0;
    io_data   = 8'h00;

    if (state == S_IDLE && any) begin
      case (dev)
        DEV_ROM: rom_en = !r.we;
        DEV_RAM: begin
          ram_en = 1'b1;
          ram_we = r.we;
        end
        DEV_RNG: begin
          io_ack    = rng_valid || r.we;
          io_data   = rng_data;
          rng_ready = rng_valid && !r.we;
        end
        DEV_FE: begin
          if (r.we) begin
            tx_valid = 1'b1;
            io_ack   = tx_ready;
          end else begin
            io_ack   = rx_valid;
            io_data  = rx_data;
            rx_ready = rx_valid;
          end
        end
        default: io_ack = 1'b1;           // unmapped: reads return zero
      endcase
    end

    ecp_rsp = '0;
    mcu_rsp = '0;
    if (state == S_ACK) begin
      if (owner) begin
        mcu_rsp.ack   = 1'b1;
        mcu_rsp.rdata = dev_rom_q ? rom_rdata : ram_rdata;
      end else begin
        ecp_rsp.ack   = 1'b1;
        ecp_rsp.rdata = dev_rom_q ? rom_rdata : ram_rdata;
      end
    end else if (io_ack) begin
      if (g) begin
        mcu_rsp.ack   = 1'b1;
        mcu_rsp.rdata = io_data;
      end else begin
        ecp_rsp.ack   = 1'b1;
        ecp_rsp.rdata = io_data;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      owner     <= 1'b0;
      dev_rom_q <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (any && (dev == DEV_ROM || dev == DEV_RAM)) begin
          owner     <= g;
          dev_rom_q <= (dev == DEV_ROM);
          state     <= S_ACK;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a master keeps its request stable until it is acknowledged
  property p_req_held(bus_req_t q, logic a);
    @(posedge clk) disable iff (!rst_n) (q.req && !a) |=> (q.req && $stable(q.addr) && $stable(q.we));
  endproperty
  a_ecp_held: assert property (p_req_held(ecp_req, ecp_rsp.ack));
  a_mcu_held: assert property (p_req_held(mcu_req, mcu_rsp.ack));

endmodule
