# Isolating FPGA accelerators that share one PL-PS port

On an FPGA SoC such as the Zynq UltraScale+, accelerators in the programmable
logic (PL) reach the processing system (PS) through a few AXI ports. The PS
IOMMU (the Arm SMMU) can give each bus manager its own address translation, but
it tells managers apart only by their **Stream ID**. For a PL-PS port the
Stream ID is the port's fixed bits followed by the transaction's AXI ID:

| bits  | 14:10      | 9:6                 | 5:0    |
|-------|------------|---------------------|--------|
| field | TBU number | manager ID of port  | AXI ID |

When several accelerators share a port through an AXI interconnect, the
interconnect makes up the AXI IDs. Every accelerator behind the port then gets
the same Stream IDs, and the IOMMU cannot keep them apart. The accelerators
also drive their own security attributes: AxPROT (TrustZone secure or
non-secure), AxQOS (memory priority) and AxCACHE (cache behaviour). A
compromised accelerator could use them to reach secure memory or to take
priority on the DDR controller.

This RTL fixes both problems with two small AXI4 blocks placed around the
interconnect:

```
 HA 0 --> axi_enforcer --+
                         +--> interconnect --> axi_id_mapper --> PL-PS port --> SMMU
 HA 1 --> axi_enforcer --+    (vendor IP,      (AIM)
                              not included)
```

* **AXI Enforcer** (`rtl/axi_enforcer.sv`). It overwrites AxPROT, AxQOS,
  AxCACHE and AxUSER on both address channels with values fixed at design
  time. AxUSER gets the accelerator's identifier. Interconnects change AXI IDs
  but leave AxUSER alone, so the identifier survives to the far side.
* **AXI ID Mapper, AIM** (`rtl/axi_id_mapper.sv`). It reads AxUSER and moves
  the request's AXI ID into an ID range (a *pool*) reserved for that
  accelerator. On the way back it restores the original ID, so the
  interconnect can still route the response.

After this chain, each accelerator has its own set of Stream IDs and the SMMU
can give it its own translation regime. The SMMU setup, locking of its
registers and secure boot are software and vendor flow, and are not part of
this RTL.

## The ID pools

The mapper has `NUMBER_OF_MANAGERS` pools of `POOL_SIZE` IDs each. Pool `i` is
`i*POOL_SIZE .. (i+1)*POOL_SIZE-1`. A request selects pool `i` when its AxUSER
equals `AXUSER_MAP[i]`. The mapping has no state:

* **Request (AW, AR):** `new_id = i*POOL_SIZE + incoming_id`.
* **Response (B, R):** `original_id = id mod POOL_SIZE`. Each pool starts at a
  multiple of `POOL_SIZE`, so this is the offset inside the pool.

For this to work, the interconnect must hand out IDs below `POOL_SIZE`. Set
`POOL_SIZE` to the number of ID threads the interconnect generates: 1 for a
single-ordered interconnect, which always sends ID 0. All pools must fit in the
6-bit AXI ID of the port, so `NUMBER_OF_MANAGERS * POOL_SIZE <= 64`. An
elaboration-time `$error` enforces this limit. With a pool size of 1, up to 64
accelerators can be told apart.

Each request keeps its own AxUSER value on the way to the port.

## Configuration errors and the interrupt

A request is a configuration error if no pool maps its AxUSER, or if its ID is
not below `POOL_SIZE`. Either case sets `irq`. `irq` stays high until reset,
because the blocks have no register interface through which it could be
cleared. The offending request is accepted and then discarded, so it never
reaches the port under any Stream ID.

AXI4 write data carries no ID, so the mapper has to find the W beats of a
discarded write. For every write address it accepts, it queues a one-bit flag,
in order, in a small FIFO. The flag says whether the matching write burst is
forwarded or dropped. A W beat leaves the mapper only when the flag at the head
of that FIFO is known. Beats of a dropped burst are consumed silently. The
mapper sends no response for a discarded request, so the manager that issued
it stalls. The interrupt is how software finds out.

## Buffering, back-pressure and timing

Each of the five channels passes through an `aim_buffer`. Each buffer is a
capture register followed by a FIFO with `*_BUF_SIZE` entries:

| channel | buffer parameter       | direction             |
|---------|------------------------|-----------------------|
| AW      | `WRITE_REQ_BUF_SIZE`   | interconnect to port  |
| W       | `WRITE_BURST_BUF_SIZE` | interconnect to port  |
| B       | `WRITE_RSP_BUF_SIZE`   | port to interconnect  |
| AR      | `READ_REQ_BUF_SIZE`    | interconnect to port  |
| R       | `READ_BURST_BUF_SIZE`  | port to interconnect  |

The mapper keeps accepting while the far side is not ready. It pulls its
READY low only when a buffer is full. A buffer then holds `*_BUF_SIZE + 1`
items: the FIFO plus the capture register.

Latency is two clock cycles for an item that enters an empty buffer. Items that
follow back to back leave one per cycle. The enforcers are combinational and
add no latency. Larger buffers absorb longer stalls at the port, but cost area
roughly in proportion to their depth.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/axi_iso_pkg.sv` | package | widths (AXI ID 6, AxUSER 10), `user_map_t`, identity pool map, `stream_id()` |
| `rtl/aim_buffer.sv` | `aim_buffer` | channel FIFO with valid/ready handshake, 2-cycle latency, full throughput |
| `rtl/axi_enforcer.sv` | `axi_enforcer` | attribute enforcement, combinational |
| `rtl/axi_id_mapper.sv` | `axi_id_mapper` | pool mapping, five buffers, W-drop flags, `irq` |
| `rtl/pl_ps_port_isolation.sv` | `pl_ps_port_isolation` | `N_HA` enforcers plus one mapper around one port |
| `rtl/railway_replica_pl.sv` | `railway_replica_pl` (top) | six `pl_ps_port_isolation`, twelve accelerators |

`pl_ps_port_isolation` does not contain the interconnect. The enforced accelerator ports come
out as `ic_s_axi_*`. The interconnect's merged manager port goes back in as
`ic_m_axi_*`. The port side is `ps_axi_*`. Per-accelerator ports are packed
arrays indexed by accelerator. The per-accelerator parameters
(`AxPROT_VALUES`, `AxUSER_VALUES`, `AxQOS_VALUES`, `AxCACHE_VALUES`,
`ENFORCE_AxCACHE`) are packed arrays with element 0 for accelerator 0.

Its defaults reproduce a two-DMA reference design:

| item | accelerator 0 | accelerator 1 |
|------|---------------|---------------|
| enforced AxPROT | 000 (secure) | 010 (non-secure) |
| enforced AxUSER | 0 | 1 |
| enforced AxQOS | 0000 | 0100 |
| enforced AxCACHE | 0000 | 0000 |
| data width | 32 bits | 32 bits |

The mapper defaults are: 32-bit address, 128-bit data, pool size 1, AxUSER map
{0, 1}, and every buffer 2 deep.

All the AXI ports use the full AXI4 field set except AxREGION and the
W/B/R user signals. Reset is synchronous and active low (`rst_n`).

## The top: one replica of a railway controller

`rtl/railway_replica_pl.sv` (`railway_replica_pl`, the top) applies the chain
to the programmable logic of one replica of a 2-out-of-2 railway controller.
Twelve accelerators share six SMMU-capable ports, two per port. There is one
`pl_ps_port_isolation` per port:

| port | accelerator 0 | accelerator 1 | AxPROT | AxQOS | AxCACHE | read-data buffer |
|------|---------------|---------------|--------|-------|---------|------------------|
| HP0  | SPI vote receive | SPI vote send | secure | 15 / 15 | 0 | 2 |
| HP1  | CAN brake | CAN traction | secure | 15 / 14 | 0 | 2 |
| HP2  | status UART 0 | status UART 1 | secure | 13 / 13 | 0 | 2 |
| HP3  | NN accelerator 0 DATA0 | NN accelerator 1 DATA0 | non-secure | 0 | not enforced | 24 |
| HPC0 | NN accelerator 0 DATA1 | NN accelerator 1 DATA1 | non-secure | 0 | not enforced | 48 |
| HPC1 | NN accelerator 0 IF | NN accelerator 1 IF | non-secure | 0 | not enforced | 2 |

The first three ports form the `rt` group: DMA engines of the real-time,
safety-critical domain, 32-bit data. The last three form the `vm` group: the
data and instruction-fetch ports of the two neural-network accelerators of the
two virtual machines, 128-bit data. Secure is encoded as AxPROT 000 and
non-secure as 010. In each port the two accelerators carry AxUSER 0 and 1 and
get ID pools 0 and 1. Every port has its own TBU and port bits in the Stream ID,
so the twelve accelerators end up with twelve different Stream IDs. The
read-data buffers of 24 and 48 on the DATA0 and DATA1 ports are the sizes at
which those ports ran with no READY stall. Every other buffer is 2 deep.
Addresses are 40 bits.

Ports are grouped by prefix (`rt_`, `vm_`) and then by the same four
interfaces as the one-port block (`ha_axi_*`, `ic_s_axi_*`, `ic_m_axi_*`,
`ps_axi_*`). Accelerator-side arrays are indexed `[port in group][accelerator]`.
`irq[5:0]` has one bit per port, in the order HP0, HP1, HP2, HP3, HPC0, HPC1.
All values in the table are parameters (`RT_AxQOS`, `RT_AxPROT`, `RT_AxCACHE`,
`VM_AxPROT`, `VM_AxQOS`, `VM_READ_BURST_BUF_SIZE`, `BUF_SIZE`).

## Where this RTL departs from, or adds to, the reference design

* `ENFORCE_AxCACHE` is an addition. The reference enforcer always sets
  AxCACHE, yet its use case leaves AxCACHE unenforced for some accelerators.
* The handling of a configuration error is this design's choice: the request
  is discarded, its W beats too, no response is sent, and `irq` stays set
  until reset. The reference only says that an interrupt is raised.
* The stateless `+base` / `mod POOL_SIZE` ID mapping, and the rule that an
  incoming ID of `POOL_SIZE` or more is an error, are this design's reading of
  "a new value from the assigned pool" and "the original value".
* The reference gives the latency (two cycles for the first item, one for each
  following item) but not the buffer's internal structure. The capture register
  that produces this latency also adds one entry of capacity beyond `*_BUF_SIZE`.
* The reference mentions read and write transactions with separate FIFOs, but
  not that a W beat must wait until its write address has entered the mapper.
  This rule is this design's own.
* The reference's area figures use a 40-bit address, and its two-DMA block
  design a 32-bit one. The top uses 40 bits; `pl_ps_port_isolation` and
  `axi_id_mapper` default to 32, as in the block design.
* Which encoding of "secure" and "non-secure" goes on AxPROT, the AxUSER
  values of the railway accelerators, their pool size, and the buffer sizes of
  the real-time ports are not given for the railway system. The values above
  are this design's choice, taken from the two-DMA block design.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/axi_iso_pkg.sv tb/tb_railway_replica_pl.sv \
  --top-module tb_railway_replica_pl -Mdir obj && obj/Vtb_railway_replica_pl
```

Replace the testbench name to run another one:

| testbench | what it shows |
|-----------|---------------|
| `tb_aim_buffer` | 2-cycle first-item latency; one item per cycle back to back; capacity of `DEPTH+1` under a stalled consumer; order under random traffic |
| `tb_axi_enforcer` | enforced fields on both address channels, everything else unchanged, for an enforcing and a cache-passing configuration |
| `tb_axi_id_mapper` | three pools of four IDs; random bursts with mapped and unmapped AxUSER and out-of-pool IDs; a reference model of the mapping; random back-pressure on all five channels; latency and the buffer-full stall |
| `tb_pl_ps_port_isolation` | the one-port block at its defaults, with two accelerators writing and reading back |
| `tb_railway_replica_pl` | the top at its defaults: twelve accelerators on six ports, end to end |
| `tb_aim_sweep` | the mapper in sixteen configurations, all with 40-bit address and 128-bit data: read-data buffer 2, 3, 4, 8, 24, 48; write-request buffer 2 to 64; 2/4/8/16 managers with pools of 1/2/3/4 IDs. Each one checks the mapping, the restore, and that a stalled buffer holds exactly depth + 1 items |

In `tb_pl_ps_port_isolation` and `tb_railway_replica_pl`, the accelerators
are traffic generators that write bursts into their own address window and
read them back. They drive hostile attributes: random AxPROT, AxQOS, AxCACHE
and AxUSER. A memory model of each port checks that every request arrives with
its own accelerator's enforced attributes and pool ID. The interconnect is
`tb/axi_interconnect_model.sv`, a behavioural single-ordered interconnect
(all IDs 0, in-order responses). It does not convert data widths: it uses the
low lanes of the 128-bit port. The reusable models are
`tb/axi_ha_traffic_model.sv` and `tb/axi_port_memory_model.sv`.

Both testbenches count each mechanism and fail if one never happened:
attribute override, ID remap, ID restore, a stall because a mapper buffer is
full, port back-pressure, and the configuration-error interrupt. The railway
testbench also checks two things. First, the twelve Stream IDs are all
different. Second, one misconfigured read on HP0 raises `irq[0]` and no other
bit. Each of the six DMA engines starts with one full 256-beat burst, the
longest an AXI4 burst can be. The testbench runs at the top's default
parameters.

## What is not here

* The interconnect.
* The accelerators: DMA engines, serial interfaces, neural-network cores.
* The PS port, the SMMU and its boot-time configuration, the memory protection
  unit in front of the accelerators, and secure boot.
* The watchdog and vote exchange between the two replicas of the railway
  controller.

These are vendor hard or soft IP, software, or outside the chip. The
testbenches use traffic generators, an interconnect model and a memory model
in their place. So no simulation here shows real timings: inference times,
transfer times in microseconds, and the area and power of each buffer size all
depend on parts that are not modelled.
